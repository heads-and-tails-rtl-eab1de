// tb_hat_btb: checks the tail-pointer BTB against a behavioural associative model.
// Random writes and lookups over a PC range four times the table size exercise hits,
// misses, tag conflicts (a later write to the same index evicts), flush and reset.
// Writes take effect one clock later.
module tb_hat_btb;
  import hat_pkg::*;

  localparam int E = 16, PCB = 12;

  logic           clk = 0, rst_n = 0, flush = 0, wr_en = 0, hit;
  logic [PCB-1:0] lookup_pc = '0, wr_pc = '0;
  toff_t          off, wr_off = '0;
  int checks = 0, failures = 0, hits = 0, misses = 0;

  // model: index -> (valid, pc, off)
  logic           m_valid [E];
  logic [PCB-1:0] m_pc    [E];
  toff_t          m_off   [E];

  hat_btb #(.ENTRIES(E), .PC_BITS(PCB)) dut (.clk, .rst_n, .flush, .lookup_pc, .hit, .off, .wr_en, .wr_pc, .wr_off);

  always #5 clk = ~clk;

  task automatic lookup_check();
    int idx;
    bit exp_hit;
    idx = int'(lookup_pc) % E;
    exp_hit = m_valid[idx] && m_pc[idx] == lookup_pc;
    #1;
    checks++;
    if (hit != exp_hit || (exp_hit && off != m_off[idx])) begin
      failures++;
      if (failures < 10) $display("FAIL pc=%h hit=%b exp=%b off=%0d exp=%0d", lookup_pc, hit, exp_hit, off, m_off[idx]);
    end
    if (exp_hit) hits++; else misses++;
  endtask

  initial begin
    for (int e = 0; e < E; e++) m_valid[e] = 0;
    repeat (2) @(posedge clk);
    rst_n <= 1;
    @(posedge clk);
    for (int t = 0; t < 3000; t++) begin
      @(negedge clk);
      lookup_pc = PCB'($urandom % (4 * E));
      lookup_check();
      wr_en  = ($urandom % 3) == 0;
      flush  = ($urandom % 200) == 0;
      wr_pc  = PCB'($urandom % (4 * E));
      wr_off = toff_t'($urandom % 33);
      @(posedge clk);
      #1;
      if (flush) begin
        for (int e = 0; e < E; e++) m_valid[e] = 0;
      end else if (wr_en) begin
        m_valid[int'(wr_pc) % E] = 1;
        m_pc[int'(wr_pc) % E]    = wr_pc;
        m_off[int'(wr_pc) % E]   = wr_off;
      end
      wr_en = 0;
      flush = 0;
    end
    // reset clears everything
    @(negedge clk);
    rst_n = 0;
    @(posedge clk);
    #1;
    rst_n = 1;
    for (int e = 0; e < E; e++) m_valid[e] = 0;
    for (int p = 0; p < 4 * E; p++) begin
      lookup_pc = PCB'(p);
      lookup_check();
    end
    checks++;
    if (hits < 100 || misses < 100) begin
      failures++;
      $display("FAIL too few hits (%0d) or misses (%0d)", hits, misses);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
