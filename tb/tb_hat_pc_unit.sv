// tb_hat_pc_unit: closed-loop test of the PC / tail-pointer sequencer.
//
// The testbench stands in for the bundle memory and decoder. It holds 8 bundles, each
// described only by its instruction count and tail lengths. From the unit's current
// PC and tail offset it returns what the decoder would: the last instruction #, the
// group's tail offsets and next offset, the TSBV offset, and BTB hits from a map it
// fills from the unit's BTB writes. Random redirects use every branch scheme, with good
// and bad targets. Checked every cycle:
//   - the issued instructions form the exact program-order stream from the last
//     redirect target, crossing bundles at their last instruction;
//   - the tail offset given to the decoder is the true one whenever it is used;
//   - latency: the target issues 1 cycle after the redirect, plus floor(k/W) cycles
//     when it is found by scanning (BR_SCAN, BTB miss);
//   - a target past the bundle's last instruction (or an indirect jump into the middle
//     of a bundle under BR_TAILPTR) raises bad_target once and stops issue;
//   - every BTB write carries the redirect target and its true tail offset.
// Each mechanism is counted and must occur.
module tb_hat_pc_unit;
  import hat_pkg::*;

  localparam int W = 4, ABITS = 3, NB = 8;

  logic clk = 0, rst_n = 0;
  logic redirect_valid = 0, redirect_tp_valid = 0;
  logic [ABITS-1:0] redirect_bundle = '0;
  logic [3:0] redirect_inst = '0;
  toff_t redirect_tp = '0;
  br_scheme_e br_scheme = BR_SCAN;
  logic btb_hit;
  toff_t btb_off;
  logic [3:0] last;
  toff_t next_off, tsbv_off;
  toff_t [W-1:0] slot_off;
  logic [ABITS-1:0] bundle;
  logic [3:0] inst, issue_from;
  toff_t base_off;
  logic active, bad_target, btb_wr_en;
  logic [ABITS+3:0] btb_wr_pc;
  toff_t btb_wr_off;

  int n_of [NB];
  int len_of [NB][16];
  int checks = 0, failures = 0;
  int c_seq = 0, c_wrap = 0, c_bad = 0, c_btb_hit = 0, c_btb_fill = 0;
  int c_scheme [4] = '{0, 0, 0, 0};

  hat_pc_unit #(.BUNDLE_BITS(256), .W(W), .ABITS(ABITS)) dut (.*);

  always #5 clk = ~clk;

  function automatic int toff_ref(int b, int k);
    int s = 0;
    for (int i = 0; i < k && i < 16; i++) s += len_of[b][i];
    return s;
  endfunction

  // decoder / memory stand-in
  always_comb begin
    int s;
    last = 4'(n_of[bundle] - 1);
    s = int'(base_off);
    for (int i = 0; i < W; i++) begin
      slot_off[i] = toff_t'(s);
      if (int'(inst) + i < 16) s += len_of[bundle][int'(inst) + i];
    end
    next_off = toff_t'(s);
    tsbv_off = toff_t'(toff_ref(int'(bundle), int'(inst)));
  end

  // BTB stand-in
  int btb_map [int];
  always_comb begin
    int key;
    key     = int'({redirect_bundle, redirect_inst});
    btb_hit = btb_map.exists(key);
    btb_off = btb_hit ? toff_t'(btb_map[key]) : '0;
  end

  task automatic chk(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 15) $display("FAIL @%0t %s", $time, what);
    end
  endtask

  // expected stream state
  int  exp_b, exp_k, wait_cycles, since, tgt_pc;
  bit  expect_bad, halted_m, first_seen;

  initial begin
    for (int b = 0; b < NB; b++) begin
      n_of[b] = 1 + int'($urandom % 16);
      for (int i = 0; i < 16; i++) len_of[b][i] = (i < n_of[b]) ? 1 + int'($urandom % 2) : 0;
    end
    n_of[0] = 16;  // long enough for multi-cycle scans
    exp_b = 0; exp_k = 0; tgt_pc = -1; wait_cycles = 0; since = 0;
    expect_bad = 0; halted_m = 0; first_seen = 1;
    repeat (2) @(posedge clk);
    rst_n <= 1;

    for (int cyc = 0; cyc < 6000; cyc++) begin
      @(negedge clk);
      // --- drive: maybe redirect this cycle
      redirect_valid = ($urandom % 6) == 0 || (halted_m && ($urandom % 2 == 0));
      if (redirect_valid) begin
        redirect_bundle   = ABITS'($urandom % NB);
        redirect_inst     = 4'($urandom % 16);
        if ($urandom % 3 != 0 && int'(redirect_inst) >= n_of[redirect_bundle])
          redirect_inst = 4'($urandom % n_of[redirect_bundle]);
        br_scheme         = br_scheme_e'($urandom % 4);
        redirect_tp_valid = ($urandom % 5) != 0;
        redirect_tp       = toff_t'(toff_ref(int'(redirect_bundle), int'(redirect_inst)));
        if (br_scheme == BR_BTB && $urandom % 2 == 0) begin
          // re-use a recently filled target so that hits happen
          redirect_bundle = 0;
          redirect_inst   = 4'($urandom % 8);
        end
      end
      #1;
      // --- check this cycle's issue
      if (!redirect_valid) begin
        for (int i = 0; i < W; i++) begin
          int h;
          h = int'(inst) + i;
          if (active && h <= int'(last) && h >= int'(issue_from)) begin
            chk(!halted_m && !expect_bad, "issue while halted");
            chk(int'(bundle) == exp_b && h == exp_k, $sformatf("stream: got %0d.%0d exp %0d.%0d", bundle, h, exp_b, exp_k));
            if (!first_seen) begin
              chk(since == wait_cycles, $sformatf("latency %0d exp %0d", since, wait_cycles));
              first_seen = 1;
            end
            if (exp_k + 1 < n_of[exp_b]) begin
              exp_k++;
              if (i == W - 1) c_seq++;
            end else begin
              exp_b = (exp_b + 1) % NB;
              exp_k = 0;
              c_wrap++;
            end
          end
        end
        if (active && int'(inst) <= int'(last))
          chk(int'(base_off) == toff_ref(int'(bundle), int'(inst)), $sformatf("base_off %0d exp %0d", base_off, toff_ref(int'(bundle), int'(inst))));
        if (since == 1 || bad_target)
          chk(bad_target == expect_bad && since == 1, $sformatf("bad_target=%b exp=%b since=%0d", bad_target, expect_bad, since));
        if (bad_target) begin
          c_bad++;
          halted_m = 1;
        end
        if (btb_wr_en) begin
          chk(int'(btb_wr_pc) == tgt_pc, "btb write pc is not the redirect target");
          chk(int'(btb_wr_off) == toff_ref(int'(btb_wr_pc[ABITS+3:4]), int'(btb_wr_pc[3:0])), "btb off");
          chk(int'(btb_wr_pc[3:0]) < n_of[btb_wr_pc[ABITS+3:4]], "btb target in bundle");
        end
      end
      // --- advance the expected state at the clock edge
      @(posedge clk);
      #1;
      if (!redirect_valid && btb_wr_en) begin
        btb_map[int'(btb_wr_pc)] = int'(btb_wr_off);
        c_btb_fill++;
      end
      since++;
      if (redirect_valid) begin
        c_scheme[br_scheme]++;
        if (br_scheme == BR_BTB && btb_hit) c_btb_hit++;
        exp_b       = int'(redirect_bundle);
        exp_k       = int'(redirect_inst);
        tgt_pc      = int'({redirect_bundle, redirect_inst});
        expect_bad  = exp_k >= n_of[exp_b] ||
                      (br_scheme == BR_TAILPTR && !redirect_tp_valid && exp_k != 0);
        wait_cycles = 1;
        if (br_scheme == BR_SCAN || (br_scheme == BR_BTB && !btb_hit)) wait_cycles += exp_k / W;
        since       = 1;
        halted_m    = 0;
        first_seen  = expect_bad;
        redirect_valid = 0;
      end
    end
    chk(c_seq > 0, "no sequential advance");
    chk(c_wrap > 0, "no end-of-bundle wrap");
    chk(c_bad > 0, "no bad target");
    chk(c_btb_hit > 0, "no BTB hit");
    chk(c_btb_fill > 0, "no BTB fill");
    for (int s = 0; s < 4; s++) chk(c_scheme[s] > 0, "scheme unused");
    $display("seq=%0d wrap=%0d bad=%0d btb_hit=%0d btb_fill=%0d schemes=%0d/%0d/%0d/%0d",
             c_seq, c_wrap, c_bad, c_btb_hit, c_btb_fill, c_scheme[0], c_scheme[1], c_scheme[2], c_scheme[3]);
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
