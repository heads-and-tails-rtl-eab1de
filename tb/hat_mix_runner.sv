// hat_mix_runner: runs one straight-line program through a hat_frontend of a given
// bundle size; used by tb_hat_workload_mix.
//
// The program has NINSTR instructions. Their sizes follow a fixed mix: 15 bits 22.1%,
// 20 bits 13.0%, 25 bits 47.5%, 30 bits 3.8%, 35 bits 3.3%, 40 bits 10.4%. That is the
// size distribution measured for MIPS-HAT code. Each instruction gets an opcode whose
// tail length gives its size, and random operand bits. The runner packs the program
// greedily into bundles (a new bundle when heads, tails or the tail region would
// overflow), refills them while in reset, and lets the front end run from bundle 0.
// Checked: every decoded instruction, in program order, and the decode rate. From
// the first to the last instruction the front end must deliver a group every cycle,
// taking exactly sum over bundles of ceil(n/W) cycles. Bundles after the program hold
// one filler instruction each. The size mix and the packing rules follow the format;
// the random program, the greedy packer and the placeholder opcode map are this
// testbench's own.
module hat_mix_runner
  import hat_pkg::*;
  import hat_tb_pkg::*;
#(
  parameter int B      = 256,
  parameter int NINSTR = 1000
) (
  input  logic clk,
  output logic done,
  output int   checks,
  output int   failures,
  output int   bundles_used
);
  localparam int W = 4, DEPTH = 256, INUM = (B == 128) ? 3 : 4, MAXI = B / 16;

  logic rst_n = 0, refill_en = 0, redirect_valid = 0, redirect_tp_valid = 0;
  logic [7:0] refill_addr = '0, redirect_bundle = '0;
  logic [B-1:0] refill_bundle = '0;
  logic [255:0] packed_b;
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

  logic [9:0]  prog_head [NINSTR];
  logic [29:0] prog_tail [NINSTR];
  int          prog_len  [NINSTR];
  binfo_t      bund      [DEPTH];

  task automatic chk(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL (B=%0d) %s", B, what);
    end
  endtask

  initial begin
    int r, l, nb, tu, next, first_cyc, last_cyc, cyc, exp_cycles;
    logic [29:0] t;
    done = 0; checks = 0; failures = 0;
    // ---- program with the size mix
    for (int i = 0; i < NINSTR; i++) begin
      r = int'($urandom % 1000);
      l = (r < 221) ? 1 : (r < 351) ? 2 : (r < 826) ? 3 : (r < 864) ? 4 : (r < 897) ? 5 : 6;
      prog_head[i] = {5'(6 * ($urandom % 5) + (l - 1)), 5'($urandom)};
      t = 30'($urandom);
      prog_tail[i] = (t >> (5 * (6 - l))) << (5 * (6 - l));
      prog_len[i]  = l;
    end
    // ---- greedy packing
    nb = 0; tu = 0;
    bund[0].n = 0;
    for (int i = 0; i < NINSTR; i++) begin
      if (bund[nb].n == MAXI || 2 * (bund[nb].n + 1) + tu + prog_len[i] > g_units(B) ||
          tu + prog_len[i] > g_tunits(B)) begin
        nb++;
        tu = 0;
        bund[nb].n = 0;
      end
      bund[nb].head[bund[nb].n] = prog_head[i];
      bund[nb].tail[bund[nb].n] = prog_tail[i];
      bund[nb].len[bund[nb].n]  = prog_len[i];
      bund[nb].n++;
      tu += prog_len[i];
    end
    nb++;
    bundles_used = nb;
    if (nb > DEPTH) $fatal(1, "program does not fit in %0d bundles", DEPTH);
    for (int b = nb; b < DEPTH; b++) bund[b] = rand_bundle(B, 1);
    exp_cycles = 0;
    for (int b = 0; b < nb; b++) exp_cycles += (bund[b].n + W - 1) / W;
    // ---- refill during reset
    for (int b = 0; b < DEPTH; b++) begin
      @(negedge clk);
      packed_b      = pack(B, bund[b]);
      refill_en     = 1;
      refill_addr   = 8'(b);
      refill_bundle = packed_b[B-1:0];
    end
    @(negedge clk);
    refill_en = 0;
    rst_n     = 1;
    // ---- run and check
    next = 0; first_cyc = -1; last_cyc = -1; cyc = 0;
    begin
      int eb, ek;
      eb = 0; ek = 0;
      while (next < NINSTR && cyc < 20 * NINSTR) begin
        @(negedge clk);
        cyc++;
        if (out_valid != '0) begin
          if (first_cyc < 0) first_cyc = cyc;
          last_cyc = cyc;
        end
        for (int i = 0; i < W; i++) begin
          if (out_valid[i] && next < NINSTR) begin
            chk(int'(out_bundle) == eb && int'(out_inst[i]) == ek,
                $sformatf("order: got %0d.%0d exp %0d.%0d", out_bundle, out_inst[i], eb, ek));
            chk(out_head[i] == prog_head[next] && out_tail[i] == prog_tail[next] &&
                int'(out_tail_len[i]) == prog_len[next], $sformatf("instruction %0d", next));
            next++;
            if (ek + 1 < bund[eb].n) ek++;
            else begin
              eb++;
              ek = 0;
            end
          end
        end
      end
    end
    chk(next == NINSTR, "program not completed");
    chk(last_cyc - first_cyc + 1 == exp_cycles,
        $sformatf("decode took %0d cycles, expected %0d", last_cyc - first_cyc + 1, exp_cycles));
    chk(!bad_target && !halted, "unexpected bad target");
    $display("B=%0d: %0d instructions in %0d bundles, decoded in %0d cycles (%0d expected)",
             B, NINSTR, nb, last_cyc - first_cyc + 1, exp_cycles);
    done = 1;
  end
endmodule
