// hat_frontend: Heads-and-Tails (HAT) instruction fetch and decode front end.
//
// Code is stored in fixed-size bundles (256 bits by default). Each instruction is split
// into a fixed 10-bit head and a variable 5..30-bit tail. Heads are packed from the
// left, tails from the right. Because all heads have the same size, the front end
// locates W heads at once and decodes their lengths in parallel. Only a short chain of
// tail-length adders depends on earlier instructions.
//
// Each cycle:
//   1. hat_pc_unit supplies the PC {bundle #, instruction #} and the current tail offset.
//   2. hat_bundle_mem returns that bundle and its tail-start bit vector (TSBV).
//   3. hat_slot_decoder decodes instructions inst .. inst+W-1 of the bundle: heads, tail
//      lengths, tail offsets, aligned tails.
//   4. The in-bundle slots are registered to the outputs, with their PCs.
// Latency: a PC's instructions appear on out_* one clock after the PC is current. A
// redirect in cycle t squashes what is decoded in t. The target's instructions appear
// at t+2, or later when the target is found by scanning.
//
// Branch targets: br_scheme selects how a branch target's tail is found (see
// hat_pc_unit): scan from the bundle start, the TSBV (hat_tsbv_locator), a tail pointer
// carried in the target PC, or a BTB entry (hat_btb, filled after a scan).
//
// Refill: refill_en writes one bundle (and its generated TSBV) per clock and flushes the
// BTB. Reset is synchronous, active low. It clears the PC and BTB state, not the
// bundle memory.
//
// The bundle format, the parallel head decode, the adder chain, the PC sequencing and
// the three branch schemes follow the HAT format. The decode width W, the memory depth,
// the BTB organisation, the redirect interface and the halt on a bad target are this
// design's own choices.
module hat_frontend
  import hat_pkg::*;
#(
  parameter int         BUNDLE_BITS = 256,
  parameter int         W           = 4,
  parameter int         DEPTH       = 256,
  parameter int         BTB_ENTRIES = 16,
  parameter len_table_t LEN_TABLE   = DEFAULT_LEN_TABLE,
  localparam int        INUM        = inum_bits(BUNDLE_BITS),
  localparam int        ABITS       = $clog2(DEPTH)
) (
  input  logic                   clk,
  input  logic                   rst_n,
  // refill port
  input  logic                   refill_en,
  input  logic [ABITS-1:0]       refill_addr,
  input  logic [BUNDLE_BITS-1:0] refill_bundle,
  // branch redirect
  input  logic                   redirect_valid,
  input  logic [ABITS-1:0]       redirect_bundle,
  input  logic [INUM-1:0]        redirect_inst,
  input  logic                   redirect_tp_valid,
  input  toff_t                  redirect_tp,
  input  br_scheme_e             br_scheme,
  // decoded instructions
  output logic [W-1:0]           out_valid,
  output logic [ABITS-1:0]       out_bundle,
  output logic [W-1:0][INUM-1:0] out_inst,
  output head_t [W-1:0]          out_head,
  output tail_t [W-1:0]          out_tail,
  output tlen_t [W-1:0]          out_tail_len,
  output logic [W-1:0]           out_illegal,
  output logic                   bad_target,
  output logic                   halted
);
  localparam int TU = tail_units(BUNDLE_BITS);

  logic [ABITS-1:0]       pc_bundle;
  logic [INUM-1:0]        pc_inst, issue_from, last;
  toff_t                  base_off, next_off, tsbv_off, btb_off, btb_wr_off;
  logic                   active, bad_now, btb_hit, tsbv_found, btb_wr_en;
  logic [ABITS+INUM-1:0]  btb_wr_pc;
  logic [BUNDLE_BITS-1:0] bundle;
  logic [TU-1:0]          tsbv;
  logic [W-1:0]           in_bundle, slot_illegal;
  logic [W-1:0][INUM-1:0] slot_inst;
  head_t [W-1:0]          slot_head;
  tlen_t [W-1:0]          slot_len;
  toff_t [W-1:0]          slot_off;
  tail_t [W-1:0]          slot_tail;
  logic [W-1:0]           issue;

  hat_pc_unit #(.BUNDLE_BITS(BUNDLE_BITS), .W(W), .ABITS(ABITS)) u_pc (
    .clk, .rst_n,
    .redirect_valid, .redirect_bundle, .redirect_inst, .redirect_tp_valid, .redirect_tp,
    .br_scheme, .btb_hit, .btb_off,
    .last, .next_off, .slot_off, .tsbv_off,
    .bundle     (pc_bundle),
    .inst       (pc_inst),
    .base_off   (base_off),
    .issue_from (issue_from),
    .active     (active),
    .bad_target (bad_now),
    .btb_wr_en, .btb_wr_pc, .btb_wr_off
  );

  hat_bundle_mem #(.BUNDLE_BITS(BUNDLE_BITS), .DEPTH(DEPTH), .LEN_TABLE(LEN_TABLE)) u_mem (
    .clk,
    .wr_en     (refill_en),
    .wr_addr   (refill_addr),
    .wr_bundle (refill_bundle),
    .rd_addr   (pc_bundle),
    .rd_bundle (bundle),
    .rd_tsbv   (tsbv)
  );

  hat_tsbv_locator #(.BUNDLE_BITS(BUNDLE_BITS)) u_loc (
    .tsbv  (tsbv),
    .inst  (pc_inst),
    .off   (tsbv_off),
    .found (tsbv_found)
  );

  hat_btb #(.ENTRIES(BTB_ENTRIES), .PC_BITS(ABITS + INUM)) u_btb (
    .clk, .rst_n,
    .flush     (refill_en),
    .lookup_pc ({redirect_bundle, redirect_inst}),
    .hit       (btb_hit),
    .off       (btb_off),
    .wr_en     (btb_wr_en),
    .wr_pc     (btb_wr_pc),
    .wr_off    (btb_wr_off)
  );

  hat_slot_decoder #(.BUNDLE_BITS(BUNDLE_BITS), .W(W), .LEN_TABLE(LEN_TABLE)) u_dec (
    .bundle, .inst (pc_inst), .base_off,
    .last, .in_bundle, .slot_inst, .slot_head, .slot_len, .slot_off, .slot_tail,
    .slot_illegal, .next_off
  );

  always_comb begin
    for (int i = 0; i < W; i++)
      issue[i] = active && !redirect_valid && in_bundle[i] && (slot_inst[i] >= issue_from);
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      out_valid  <= '0;
      bad_target <= 1'b0;
      halted     <= 1'b0;
    end else begin
      out_valid  <= issue;
      bad_target <= bad_now && !redirect_valid;
      halted     <= !active && !redirect_valid;
    end
    out_bundle   <= pc_bundle;
    out_inst     <= slot_inst;
    out_head     <= slot_head;
    out_tail     <= slot_tail;
    out_tail_len <= slot_len;
    out_illegal  <= slot_illegal;
  end

  // With every head owning a tail, the TSBV must reach any instruction up to the last.
  always_ff @(posedge clk)
    if (rst_n && active && !redirect_valid)
      assert (tsbv_found || pc_inst > last)
        else $error("tail-start bit vector is missing a tail start");
endmodule
