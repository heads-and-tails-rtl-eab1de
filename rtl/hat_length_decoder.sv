// hat_length_decoder: finds how long an instruction's tail is from its head alone.
//
// In HAT the primary opcode in the head determines the instruction length. So one
// decoder per head can work on all the heads of a bundle at once: no head waits for the
// length of an earlier instruction. The decoder looks the 5-bit opcode (head[9:5]) up
// in a 32-entry table and returns the tail length in 5-bit units (1..6, i.e. 15- to
// 40-bit instructions). It is purely combinational.
//
// The table contents are this design's choice (see hat_pkg); an entry of 0 or 7 is
// reported through `illegal`.
module hat_length_decoder
  import hat_pkg::*;
#(
  parameter len_table_t LEN_TABLE = DEFAULT_LEN_TABLE
) (
  input  head_t head,
  output tlen_t tail_len,
  output logic  illegal
);
  logic [4:0] op;

  always_comb begin
    op       = head[HEAD_BITS-1 -: UNIT_BITS];
    tail_len = LEN_TABLE[op];
    illegal  = (tail_len == 3'd0) || (tail_len > 3'(MAX_TAIL_UNITS));
  end
endmodule
