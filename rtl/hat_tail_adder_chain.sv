// hat_tail_adder_chain: the only serial part of HAT length decoding.
//
// Tails are packed from the right end of the bundle. The right end of an instruction's
// tail therefore lies the summed tail lengths of all earlier instructions in the bundle
// away from the bundle's right end. `base` is that offset for the first of N
// consecutive instructions. The chain adds each instruction's tail length in turn:
//   off[0] = base,  off[i+1] = off[i] + len[i],  next_off = off[N].
// The head-length decoders work in parallel, so these adders are all that depends on
// earlier lengths. Purely combinational; offsets are in 5-bit units.
module hat_tail_adder_chain
  import hat_pkg::*;
#(
  parameter int N = 4
) (
  input  toff_t           base,
  input  tlen_t [N-1:0]   len,
  output toff_t [N-1:0]   off,
  output toff_t           next_off
);
  toff_t acc;

  always_comb begin
    acc = base;
    for (int i = 0; i < N; i++) begin
      off[i] = acc;
      acc    = acc + toff_t'(len[i]);
    end
    next_off = acc;
  end
endmodule
