// hat_slot_decoder: decodes W consecutive instructions of one bundle in parallel.
//
// Decode starts at instruction number `inst`. `base_off` is the offset of that
// instruction's tail right end from the bundle's right end. For each slot i the decoder:
//   1. selects head inst+i from the head area (heads have a fixed size, so this is a
//      plain multiplexer);
//   2. decodes that head's tail length, with one hat_length_decoder per slot, all in
//      parallel;
//   3. finds the tail's position with the tail-length adder chain (hat_tail_adder_chain);
//   4. cuts the tail out with a hat_tail_align unit-granular multiplexer.
// A slot is `in_bundle` when inst+i does not exceed the bundle's last instruction number
// (the bundle's first field). `next_off` is the
// tail offset of instruction inst+W; the PC logic uses it for the next cycle.
// Purely combinational. W = 4 is this design's choice; the format allows any width.
module hat_slot_decoder
  import hat_pkg::*;
#(
  parameter int         BUNDLE_BITS = 256,
  parameter int         W           = 4,
  parameter len_table_t LEN_TABLE   = DEFAULT_LEN_TABLE,
  localparam int        INUM        = inum_bits(BUNDLE_BITS)
) (
  input  logic [BUNDLE_BITS-1:0]  bundle,
  input  logic [INUM-1:0]         inst,
  input  toff_t                   base_off,
  output logic [INUM-1:0]         last,
  output logic [W-1:0]            in_bundle,
  output logic [W-1:0][INUM-1:0]  slot_inst,
  output head_t [W-1:0]           slot_head,
  output tlen_t [W-1:0]           slot_len,
  output toff_t [W-1:0]           slot_off,
  output tail_t [W-1:0]           slot_tail,
  output logic [W-1:0]            slot_illegal,
  output toff_t                   next_off
);
  localparam int MAXI  = max_instr(BUNDLE_BITS);
  localparam int UNITS = num_units(BUNDLE_BITS);

  head_t [MAXI-1:0] heads;

  always_comb begin
    last = bundle[BUNDLE_BITS-1 -: INUM];
    for (int h = 0; h < MAXI; h++)
      heads[h] = bundle[BUNDLE_BITS-1-INUM-h*HEAD_BITS -: HEAD_BITS];
  end

  always_comb begin
    for (int i = 0; i < W; i++) begin
      // wider sum so that inst+i never wraps
      in_bundle[i] = ({1'b0, inst} + (INUM+1)'(i)) <= {1'b0, last};
      slot_inst[i] = inst + INUM'(i);
      slot_head[i] = heads[slot_inst[i]];
    end
  end

  for (genvar i = 0; i < W; i++) begin : g_len
    hat_length_decoder #(.LEN_TABLE(LEN_TABLE)) u_len (
      .head     (slot_head[i]),
      .tail_len (slot_len[i]),
      .illegal  (slot_illegal[i])
    );
  end

  hat_tail_adder_chain #(.N(W)) u_chain (
    .base     (base_off),
    .len      (slot_len),
    .off      (slot_off),
    .next_off (next_off)
  );

  for (genvar i = 0; i < W; i++) begin : g_align
    hat_tail_align #(.BUNDLE_BITS(BUNDLE_BITS)) u_align (
      .bundle (bundle),
      .off    (slot_off[i]),
      .len    (slot_len[i]),
      .tail   (slot_tail[i])
    );
  end

  // UNITS is kept for readers checking the geometry: heads never pass the unit area.
  initial assert (2 * MAXI <= UNITS) else $error("head area larger than the bundle");
endmodule
