// hat_tsbv_gen: builds a bundle's tail-start bit vector (TSBV) at refill time.
//
// A branch can land on any instruction of a bundle. Its head is then found at once, but
// its tail lies after the tails of all earlier instructions. The TSBV keeps one bit per
// unit of the tail region (the bundle's last TAIL_UNITS units: 32 for a 256-bit bundle,
// 16 for a 128-bit one). Bit j stands for the unit j places left of the bundle's right
// end. Tails are laid down from the right end, so each tail starts at its rightmost
// unit. The bit of that unit is set. For instruction i that is bit off(i), where off(i)
// is the summed tail length of instructions 0..i-1. Bit 0 (tail 0) is therefore always
// set. Every instruction has a tail, so the (k+1)-th set bit marks tail k.
//
// The generator decodes all heads of the bundle in parallel and sums the tail lengths
// in one adder chain. It is combinational and sits on the refill path in front of the
// bundle memory, so the vector costs storage but no time when a branch is taken.
module hat_tsbv_gen
  import hat_pkg::*;
#(
  parameter int         BUNDLE_BITS = 256,
  parameter len_table_t LEN_TABLE   = DEFAULT_LEN_TABLE,
  localparam int        TU          = tail_units(BUNDLE_BITS)
) (
  input  logic [BUNDLE_BITS-1:0] bundle,
  output logic [TU-1:0]          tsbv
);
  localparam int INUM = inum_bits(BUNDLE_BITS);
  localparam int MAXI = max_instr(BUNDLE_BITS);

  logic [INUM-1:0]     last;
  head_t [MAXI-1:0]    heads;
  tlen_t [MAXI-1:0]    lens;
  toff_t [MAXI-1:0]    offs;
  toff_t               unused_total;
  logic  [MAXI-1:0]    unused_illegal;

  always_comb begin
    last = bundle[BUNDLE_BITS-1 -: INUM];
    for (int h = 0; h < MAXI; h++)
      heads[h] = bundle[BUNDLE_BITS-1-INUM-h*HEAD_BITS -: HEAD_BITS];
  end

  for (genvar h = 0; h < MAXI; h++) begin : g_len
    hat_length_decoder #(.LEN_TABLE(LEN_TABLE)) u_len (
      .head     (heads[h]),
      .tail_len (lens[h]),
      .illegal  (unused_illegal[h])
    );
  end

  hat_tail_adder_chain #(.N(MAXI)) u_chain (
    .base     ('0),
    .len      (lens),
    .off      (offs),
    .next_off (unused_total)
  );

  always_comb begin
    tsbv = '0;
    for (int h = 0; h < MAXI; h++)
      if (h <= int'(last) && int'(offs[h]) < TU) tsbv[offs[h][$clog2(TU)-1:0]] = 1'b1;
  end
endmodule
