// hat_pc_unit: program counter and tail pointer of the HAT front end.
//
// A HAT PC is {bundle #, instruction #}, so branch targets are counted in instructions,
// not bytes. Beside the PC this unit keeps the tail offset of the current instruction
// (`off_q`), because a head alone does not say where its tail is. Sequencing follows
// the format:
//   - sequential: the instruction # advances by W (one decode group) while the bundle
//     has more instructions; the tail offset advances by the group's summed tail
//     lengths (next_off from the adder chain);
//   - end of bundle: when the group reaches the bundle's last instruction #, the
//     bundle # is incremented, and the instruction # and tail offset go to 0;
//   - branch (redirect): the target's instruction # is checked against the target
//     bundle's last instruction # in the cycle that bundle is read. A target beyond it
//     raises bad_target and stops fetch until the next redirect.
// The target's tail is found with the scheme on br_scheme:
//   BR_SCAN    start at instruction 0 and decode forward. Groups before the target are
//              not issued (issue_from). This costs floor(k/W) cycles for target k.
//   BR_TSBV    take the offset from the tail-start bit vector locator in the cycle the
//              target bundle is read (locate_q); no extra cycle.
//   BR_TAILPTR take the offset carried with the target PC. An indirect jump has no
//              tail pointer and must target instruction 0; otherwise it is a bad target.
//   BR_BTB     take the offset from the BTB on a hit. On a miss, scan as BR_SCAN and
//              write the offset found into the BTB (btb_wr_*).
// A redirect takes effect at the next clock edge. Reset (synchronous, active low) starts
// fetch at bundle 0, instruction 0. W and all encodings of the state are this design's
// choices.
module hat_pc_unit
  import hat_pkg::*;
#(
  parameter int  BUNDLE_BITS = 256,
  parameter int  W           = 4,
  parameter int  ABITS       = 8,
  localparam int INUM        = inum_bits(BUNDLE_BITS)
) (
  input  logic                    clk,
  input  logic                    rst_n,
  // branch redirect
  input  logic                    redirect_valid,
  input  logic [ABITS-1:0]        redirect_bundle,
  input  logic [INUM-1:0]         redirect_inst,
  input  logic                    redirect_tp_valid,
  input  toff_t                   redirect_tp,
  input  br_scheme_e              br_scheme,
  input  logic                    btb_hit,
  input  toff_t                   btb_off,
  // from the bundle being decoded
  input  logic [INUM-1:0]         last,
  input  toff_t                   next_off,
  input  toff_t [W-1:0]           slot_off,
  input  toff_t                   tsbv_off,
  // fetch state
  output logic [ABITS-1:0]        bundle,
  output logic [INUM-1:0]         inst,
  output toff_t                   base_off,
  output logic [INUM-1:0]         issue_from,
  output logic                    active,
  output logic                    bad_target,
  // BTB fill after a scan
  output logic                    btb_wr_en,
  output logic [ABITS+INUM-1:0]   btb_wr_pc,
  output toff_t                   btb_wr_off
);
  logic [ABITS-1:0] bundle_q;
  logic [INUM-1:0]  inst_q, from_q, tgt_q;
  toff_t            off_q;
  logic             locate_q, check_q, ind_bad_q, fill_q, halted_q;
  logic             end_of_bundle;
  logic [INUM:0]    tgt_rel;

  always_comb begin
    bundle     = bundle_q;
    inst       = inst_q;
    issue_from = from_q;
    base_off   = locate_q ? tsbv_off : off_q;
    bad_target = check_q && ((tgt_q > last) || ind_bad_q);
    active     = !halted_q && !bad_target;
    end_of_bundle = ({1'b0, inst_q} + (INUM+1)'(W)) > {1'b0, last};

    tgt_rel    = {1'b0, tgt_q} - {1'b0, inst_q};
    btb_wr_en  = fill_q && active && !redirect_valid && (tgt_q >= inst_q) && (tgt_rel < (INUM+1)'(W));
    btb_wr_pc  = {bundle_q, tgt_q};
    btb_wr_off = slot_off[tgt_rel[$clog2(W)-1:0]];
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      bundle_q  <= '0;
      inst_q    <= '0;
      off_q     <= '0;
      from_q    <= '0;
      tgt_q     <= '0;
      locate_q  <= 1'b0;
      check_q   <= 1'b0;
      ind_bad_q <= 1'b0;
      fill_q    <= 1'b0;
      halted_q  <= 1'b0;
    end else if (redirect_valid) begin
      bundle_q  <= redirect_bundle;
      tgt_q     <= redirect_inst;
      check_q   <= 1'b1;
      halted_q  <= 1'b0;
      locate_q  <= 1'b0;
      ind_bad_q <= 1'b0;
      fill_q    <= 1'b0;
      // default: scan from the start of the bundle
      inst_q    <= '0;
      off_q     <= '0;
      from_q    <= redirect_inst;
      unique case (br_scheme)
        BR_SCAN: ;
        BR_TSBV: begin
          inst_q   <= redirect_inst;
          from_q   <= '0;
          locate_q <= 1'b1;
        end
        BR_TAILPTR: begin
          from_q <= '0;
          if (redirect_tp_valid) begin
            inst_q <= redirect_inst;
            off_q  <= redirect_tp;
          end else begin
            ind_bad_q <= (redirect_inst != '0);
          end
        end
        BR_BTB: begin
          if (btb_hit) begin
            inst_q <= redirect_inst;
            off_q  <= btb_off;
            from_q <= '0;
          end else begin
            fill_q <= 1'b1;
          end
        end
        default: ;
      endcase
    end else if (bad_target) begin
      halted_q <= 1'b1;
      check_q  <= 1'b0;
      locate_q <= 1'b0;
      fill_q   <= 1'b0;
    end else if (!halted_q) begin
      check_q  <= 1'b0;
      locate_q <= 1'b0;
      if (btb_wr_en) fill_q <= 1'b0;
      if (end_of_bundle) begin
        bundle_q <= bundle_q + 1'b1;
        inst_q   <= '0;
        off_q    <= '0;
        from_q   <= '0;
        fill_q   <= 1'b0;
      end else begin
        inst_q <= inst_q + INUM'(W);
        off_q  <= next_off;
      end
    end
  end
endmodule
