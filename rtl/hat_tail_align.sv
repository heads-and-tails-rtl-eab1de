// hat_tail_align: the tail alignment multiplexer.
//
// Given the offset of a tail's right end from the bundle's right end (in 5-bit units)
// and the tail's length, it cuts the tail out of the bundle and returns it left-aligned
// in a 30-bit word. Units beyond the tail's length are zero. The shift works in whole
// 5-bit units and reaches only across the tail region. This is why the HAT alignment
// muxes are smaller than those of a byte-granular variable-length format. Purely
// combinational.
module hat_tail_align
  import hat_pkg::*;
#(
  parameter int BUNDLE_BITS = 256
) (
  input  logic [BUNDLE_BITS-1:0] bundle,
  input  toff_t                  off,
  input  tlen_t                  len,
  output tail_t                  tail
);
  localparam int INUM  = inum_bits(BUNDLE_BITS);
  localparam int UNITS = num_units(BUNDLE_BITS);
  localparam int UB    = UNITS * UNIT_BITS;

  logic [UB-1:0] units;      // the unit area, unit 0 in the top bits
  logic [UB-1:0] shifted;
  tail_t         low;        // tail in the low bits, earlier tails' units above it
  tlen_t         len_c;

  always_comb begin
    units   = bundle[BUNDLE_BITS-1-INUM -: UB];
    shifted = units >> (UNIT_BITS * int'(off));
    low     = shifted[TAIL_BITS-1:0];
    len_c   = (len > 3'(MAX_TAIL_UNITS)) ? 3'(MAX_TAIL_UNITS) : len;
    tail    = low << (UNIT_BITS * (MAX_TAIL_UNITS - int'(len_c)));
  end
endmodule
