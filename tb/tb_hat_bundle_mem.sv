// tb_hat_bundle_mem: refills random bundles at random addresses of a small memory,
// then reads every written address back. The bundle must be unchanged and the stored
// tail-start bit vector must match the one worked out from the bundle's tail lengths.
module tb_hat_bundle_mem;
  import hat_pkg::*;
  import hat_tb_pkg::*;

  localparam int DEPTH = 32;

  logic         clk = 0, wr_en = 0;
  logic [4:0]   wr_addr = '0, rd_addr = '0;
  logic [255:0] wr_bundle = '0, rd_bundle;
  logic [31:0]  rd_tsbv;
  int checks = 0, failures = 0;

  binfo_t       shadow  [DEPTH];
  bit           written [DEPTH];

  hat_bundle_mem #(.BUNDLE_BITS(256), .DEPTH(DEPTH)) dut (.clk, .wr_en, .wr_addr, .wr_bundle, .rd_addr, .rd_bundle, .rd_tsbv);

  always #5 clk = ~clk;

  initial begin
    int a;
    for (int i = 0; i < DEPTH; i++) written[i] = 0;
    for (int round = 0; round < 20; round++) begin
      for (int t = 0; t < 24; t++) begin
        @(negedge clk);
        a = int'($urandom % DEPTH);
        shadow[a]  = rand_bundle(256, 16);
        written[a] = 1;
        wr_en      = 1;
        wr_addr    = 5'(a);
        wr_bundle  = pack(256, shadow[a]);
      end
      @(negedge clk);
      wr_en = 0;
      for (int i = 0; i < DEPTH; i++) begin
        if (written[i]) begin
          rd_addr = 5'(i);
          #1;
          checks++;
          if (rd_bundle !== pack(256, shadow[i]) || rd_tsbv !== ref_tsbv(shadow[i])) begin
            failures++;
            if (failures < 10) $display("FAIL addr %0d tsbv=%b exp=%b", i, rd_tsbv, ref_tsbv(shadow[i]));
          end
        end
      end
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
