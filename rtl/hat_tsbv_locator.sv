// hat_tsbv_locator: finds a branch target's tail from the tail-start bit vector.
//
// Bit j of the vector is set where a tail starts, j units left of the bundle's right end
// (see hat_tsbv_gen). The tail of target instruction k starts at the (k+1)-th set bit
// counted from bit 0, so its offset is that bit's position. `found` is low when the
// vector has k or fewer set bits. Then the target lies beyond the bundle's last
// instruction. This is a counting priority search over the vector: no head has to be
// decoded and no tail lengths are added. Purely combinational.
module hat_tsbv_locator
  import hat_pkg::*;
#(
  parameter int  BUNDLE_BITS = 256,
  localparam int TU          = tail_units(BUNDLE_BITS),
  localparam int INUM        = inum_bits(BUNDLE_BITS)
) (
  input  logic [TU-1:0]   tsbv,
  input  logic [INUM-1:0] inst,
  output toff_t           off,
  output logic            found
);
  always_comb begin
    int cnt;
    cnt   = 0;
    off   = '0;
    found = 1'b0;
    for (int j = 0; j < TU; j++) begin
      if (tsbv[j]) begin
        if (!found && cnt == int'(inst)) begin
          found = 1'b1;
          off   = toff_t'(j);
        end
        cnt = cnt + 1;
      end
    end
  end
endmodule
