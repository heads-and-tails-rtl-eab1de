// hat_pkg: constants, types and helper functions shared by the Heads-and-Tails (HAT)
// fetch/decode front end.
//
// A HAT bundle is a fixed-size block of code. Its first field holds the number of the
// last instruction in the bundle. After it come 5-bit units. Each instruction has a
// 10-bit head (two units: op, then reg1 or op2/imm). The heads are packed from the left,
// in program order. Each instruction also has a tail of 1 to 6 units (5 to 30 bits).
// The tails are packed from the right end of the bundle: tail 0 is rightmost, tail 1
// sits to its left, and so on. The unit sizes, head size, instruction sizes (15 to 40
// bits) and the two bundle sizes (128 and 256 bits) follow the MIPS-HAT format.
//
// This design's own choices:
// - Unit u (u = 0 is leftmost) occupies bits [B-1-INUM-5u -: 5]. In a 256-bit bundle
//   the two bits left below the last unit are unused.
// - The fields inside a tail run left to right, first field leftmost.
// - The primary opcode alone sets the tail length. The MIPS-HAT opcode map is not
//   published, so DEFAULT_LEN_TABLE is a placeholder (length = op mod 6 + 1). Replace it
//   with a real opcode map through the LEN_TABLE parameters.
package hat_pkg;

  localparam int UNIT_BITS      = 5;   // tail granularity and field size
  localparam int HEAD_BITS      = 10;  // fixed head size
  localparam int MAX_TAIL_UNITS = 6;   // 40-bit instruction = 10-bit head + 6 units
  localparam int TAIL_BITS      = MAX_TAIL_UNITS * UNIT_BITS;
  localparam int OFF_BITS       = 6;   // tail offsets 0..32 (in units)
  localparam int OPCODES        = 32;  // 5-bit primary opcode

  typedef logic [2:0]          tlen_t;   // tail length in units, 1..6
  typedef logic [OFF_BITS-1:0] toff_t;   // offset of a tail's right end from the bundle's right end
  typedef logic [HEAD_BITS-1:0] head_t;
  typedef logic [TAIL_BITS-1:0] tail_t;  // tail, left-aligned, unused units zero
  typedef logic [OPCODES-1:0][2:0] len_table_t;

  // How a branch target's tail is found (selected at run time by the front end).
  typedef enum logic [1:0] {
    BR_SCAN    = 2'd0,  // scan heads from the start of the bundle, summing tail lengths
    BR_TSBV    = 2'd1,  // tail-start bit vector stored beside each bundle
    BR_TAILPTR = 2'd2,  // tail pointer carried in the branch target PC
    BR_BTB     = 2'd3   // tail pointer cached in a BTB; scan on a miss
  } br_scheme_e;

  function automatic len_table_t make_default_len_table();
    len_table_t t;
    for (int op = 0; op < OPCODES; op++) t[op] = tlen_t'((op % 6) + 1);
    return t;
  endfunction

  localparam len_table_t DEFAULT_LEN_TABLE = make_default_len_table();

  // Bundle geometry. 128 bits: 3-bit field, 8 heads, 25 units, 16 tail units.
  // 256 bits: 4-bit field, 16 heads, 50 units, 32 tail units.
  function automatic int inum_bits(int bundle_bits);
    return $clog2(bundle_bits / 16);
  endfunction
  function automatic int max_instr(int bundle_bits);
    return bundle_bits / 16;
  endfunction
  function automatic int num_units(int bundle_bits);
    return (bundle_bits - inum_bits(bundle_bits)) / UNIT_BITS;
  endfunction
  function automatic int tail_units(int bundle_bits);
    return bundle_bits / 8;
  endfunction

endpackage
