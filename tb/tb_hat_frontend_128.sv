// tb_hat_frontend_128: the end-to-end test of tb_hat_frontend, run on the front end
// configured for 128-bit bundles (3-bit instruction #, 8 heads, 16 tail units), the
// second bundle size of the MIPS-HAT format. Everything else is at its default.
//
// All 256 bundles are first refilled with random legal bundles built from known
// instructions. Then the front end runs for 20000 cycles. It gets random redirects
// under every branch scheme, good and bad targets, indirect jumps, and refills of
// bundles away from the fetch point. The BTB refills also flush the BTB. A shadow copy
// of the memory and a model of the direct-mapped BTB give the expected results.
// Checked at every cycle:
//   - each decoded instruction (PC, head, tail length, left-aligned tail) is the next
//     one of the program-order stream since the last redirect;
//   - a redirect squashes the cycle it arrives in. The target appears 2 cycles later,
//     plus floor(k/W) cycles when its tail must be found by scanning (BR_SCAN or a
//     BTB miss);
//   - a bad target raises bad_target 2 cycles after the redirect, and the front end
//     stays halted with nothing issued until the next redirect.
// Mechanisms counted (each must occur): sequential groups, end-of-bundle crossings,
// every scheme, scans that cost cycles, BTB hits and fills, BTB flushes by refill, bad
// targets, indirect jumps to instruction 0 under BR_TAILPTR, and full 4-wide groups.
module tb_hat_frontend_128;
  import hat_pkg::*;
  import hat_tb_pkg::*;

  localparam int B = 128, W = 4, DEPTH = 256, CYCLES = 20000;
  localparam int INUM = (B == 128) ? 3 : 4, MAXI = B / 16;

  logic clk = 0, rst_n = 0;
  logic refill_en = 0;
  logic [7:0] refill_addr = '0;
  logic [B-1:0] refill_bundle = '0;
  logic [255:0] packed_b;
  logic redirect_valid = 0, redirect_tp_valid = 0;
  logic [7:0] redirect_bundle = '0;
  logic [INUM-1:0] redirect_inst = '0;
  toff_t redirect_tp = '0;
  br_scheme_e br_scheme = BR_TSBV;
  logic [W-1:0] out_valid, out_illegal;
  logic [7:0] out_bundle;
  logic [W-1:0][INUM-1:0] out_inst;
  head_t [W-1:0] out_head;
  tail_t [W-1:0] out_tail;
  tlen_t [W-1:0] out_tail_len;
  logic bad_target, halted;

  hat_frontend #(.BUNDLE_BITS(B)) dut (.*);

  always #5 clk = ~clk;

  binfo_t shadow [DEPTH];
  int btb_tag [16];              // PC held by each BTB entry, -1: empty
  int btb_seen [16];
  int checks = 0, failures = 0;
  int c_seq = 0, c_wrap = 0, c_bad = 0, c_scan_wait = 0, c_btb_hit = 0, c_btb_fill = 0;
  int c_flush = 0, c_indirect = 0, c_full = 0, c_refill = 0;
  int c_scheme [4] = '{0, 0, 0, 0};

  task automatic chk(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 15) $display("FAIL @%0t %s", $time, what);
    end
  endtask

  int  last_btb_b = -1, last_btb_k = 0;
  int  exp_b, exp_k, wait_cycles, since, miss_fill_pc;
  bit  expect_bad, halted_m, first_seen;
  bit  pend_wr;
  int  pend_addr;
  binfo_t pend_bi;

  initial begin
    for (int e = 0; e < 16; e++) btb_tag[e] = -1;
    // refill everything while in reset
    for (int a = 0; a < DEPTH; a++) begin
      @(negedge clk);
      shadow[a]     = rand_bundle(B, (a % 4 == 0) ? MAXI : 1 + a % MAXI);
      packed_b      = pack(B, shadow[a]);
      refill_en     = 1;
      refill_addr   = 8'(a);
      refill_bundle = packed_b[B-1:0];
    end
    @(negedge clk);
    refill_en = 0;
    rst_n     = 1;
    exp_b = 0; exp_k = 0; since = 0; wait_cycles = 1; first_seen = 0;
    expect_bad = 0; halted_m = 0; miss_fill_pc = -1; pend_wr = 0;

    for (int cyc = 0; cyc < CYCLES; cyc++) begin
      @(negedge clk);
      since++;
      // ---- 1. outputs: what was issued in the previous cycle
      begin
        int nvalid;
        nvalid = 0;
        for (int i = 0; i < W; i++) begin
          if (out_valid[i]) begin
            int k;
            nvalid++;
            k = int'(out_inst[i]);
            chk(!halted_m && !expect_bad, "issue while halted");
            chk(int'(out_bundle) == exp_b && k == exp_k,
                $sformatf("stream: got %0d.%0d exp %0d.%0d", out_bundle, k, exp_b, exp_k));
            chk(out_head[i] == shadow[exp_b].head[exp_k], "head");
            chk(int'(out_tail_len[i]) == shadow[exp_b].len[exp_k], "tail length");
            chk(out_tail[i] == shadow[exp_b].tail[exp_k],
                $sformatf("tail %0d.%0d got %h exp %h", exp_b, exp_k, out_tail[i], shadow[exp_b].tail[exp_k]));
            chk(!out_illegal[i], "illegal");
            if (!first_seen) begin
              chk(since == wait_cycles, $sformatf("latency %0d exp %0d", since, wait_cycles));
              if (wait_cycles > 2) c_scan_wait++;
              first_seen = 1;
              if (miss_fill_pc >= 0) begin
                // the BTB was filled at the last clock edge unless a refill flushed it
                if (!pend_wr) begin
                  btb_tag[miss_fill_pc % 16] = miss_fill_pc;
                  c_btb_fill++;
                end
                miss_fill_pc = -1;
              end
            end
            if (exp_k + 1 < shadow[exp_b].n) begin
              exp_k++;
            end else begin
              exp_b = (exp_b + 1) % DEPTH;
              exp_k = 0;
              c_wrap++;
            end
          end
        end
        if (nvalid == W) c_full++;
        if (nvalid > 0 && exp_k != 0) c_seq++;
        if (since == 2 || bad_target)
          chk(bad_target == expect_bad && since == 2,
              $sformatf("bad_target=%b exp=%b since=%0d", bad_target, expect_bad, since));
        if (since > 2 && (halted_m || expect_bad)) chk(halted, "halted flag");
        if (bad_target) begin
          c_bad++;
          halted_m = 1;
        end
      end
      // ---- 2. apply the refill written at the last edge to the shadow
      if (pend_wr) begin
        shadow[pend_addr] = pend_bi;
        pend_wr = 0;
      end
      // ---- 3. drive this cycle
      refill_en      = 0;
      redirect_valid = 0;
      btb_seen       = btb_tag;   // the BTB lookup sees the table before this cycle's flush
      if ($urandom % 40 == 0) begin
        int a;
        a = int'($urandom % DEPTH);
        if (((a - exp_b + DEPTH) % DEPTH) > 3 && ((exp_b - a + DEPTH) % DEPTH) > 3) begin
          pend_bi       = rand_bundle(B, MAXI);
          packed_b      = pack(B, pend_bi);
          pend_addr     = a;
          pend_wr       = 1;
          refill_en     = 1;
          refill_addr   = 8'(a);
          refill_bundle = packed_b[B-1:0];
          for (int e = 0; e < 16; e++) if (btb_tag[e] >= 0) begin
            c_flush++;
            break;
          end
          for (int e = 0; e < 16; e++) btb_tag[e] = -1;
          c_refill++;
        end
      end
      if ($urandom % 8 == 0 || (halted_m && $urandom % 3 == 0)) begin
        int b, k;
        bit hit;
        br_scheme = br_scheme_e'($urandom % 4);
        b = int'($urandom % DEPTH);
        if (br_scheme == BR_BTB && $urandom % 2 == 0) b = int'($urandom % 8);  // revisit targets
        k = int'($urandom % MAXI);
        if ($urandom % 4 != 0 && k >= shadow[b].n) k = int'($urandom % shadow[b].n);
        if (br_scheme == BR_BTB) begin
          if ($urandom % 2 == 0 && last_btb_b >= 0) begin
            b = last_btb_b;
            k = last_btb_k;
          end
          last_btb_b = b;
          last_btb_k = k;
        end
        redirect_valid    = 1;
        redirect_bundle   = 8'(b);
        redirect_inst     = INUM'(k);
        redirect_tp_valid = ($urandom % 6) != 0;
        redirect_tp       = toff_t'(tail_off(shadow[b], k));
        if (br_scheme == BR_TAILPTR && !redirect_tp_valid && $urandom % 2 == 0) begin
          k = 0;
          redirect_inst = '0;
        end
        // expectations
        hit           = btb_seen[(b * MAXI + k) % 16] == b * MAXI + k;
        c_scheme[br_scheme]++;
        exp_b         = b;
        exp_k         = k;
        expect_bad    = k >= shadow[b].n ||
                        (br_scheme == BR_TAILPTR && !redirect_tp_valid && k != 0);
        if (br_scheme == BR_TAILPTR && !redirect_tp_valid && k == 0) c_indirect++;
        wait_cycles   = 2;
        miss_fill_pc  = -1;
        if (br_scheme == BR_SCAN || (br_scheme == BR_BTB && !hit)) wait_cycles += k / W;
        if (br_scheme == BR_BTB && hit && !expect_bad) c_btb_hit++;
        if (br_scheme == BR_BTB && !hit && !expect_bad) miss_fill_pc = b * MAXI + k;
        since         = 0;
        halted_m      = 0;
        first_seen    = expect_bad;
        // a refill of the target bundle in the same cycle would change it under us
        if (pend_wr && pend_addr == b) begin
          refill_en = 0;
          pend_wr   = 0;
        end
      end
    end
    chk(c_seq > 0, "no sequential group");
    chk(c_wrap > 0, "no end-of-bundle crossing");
    chk(c_full > 0, "no full-width group");
    chk(c_scan_wait > 0, "no scan that cost cycles");
    chk(c_btb_hit > 0, "no BTB hit");
    chk(c_btb_fill > 0, "no BTB fill");
    chk(c_flush > 0, "no BTB flush by refill");
    chk(c_bad > 0, "no bad target");
    chk(c_indirect > 0, "no indirect jump");
    chk(c_refill > 0, "no refill while running");
    for (int s = 0; s < 4; s++) chk(c_scheme[s] > 0, "scheme unused");
    $display("seq=%0d wrap=%0d full=%0d scan_wait=%0d btb_hit=%0d btb_fill=%0d flush=%0d bad=%0d indirect=%0d refill=%0d schemes=%0d/%0d/%0d/%0d",
             c_seq, c_wrap, c_full, c_scan_wait, c_btb_hit, c_btb_fill, c_flush, c_bad, c_indirect, c_refill,
             c_scheme[0], c_scheme[1], c_scheme[2], c_scheme[3]);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #2000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
