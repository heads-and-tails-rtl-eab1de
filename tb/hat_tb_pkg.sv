// hat_tb_pkg: test support for the HAT testbenches.
//
// Builds random, legal HAT bundles from known fields so that the testbenches can check
// the hardware against the fields they started from. The rules used here are
// written out again on purpose, independently of the RTL package:
//   - first field: last instruction # (3 bits for 128-bit bundles, 4 bits for 256-bit);
//   - then 5-bit units, unit 0 leftmost; head i = units 2i and 2i+1;
//   - tails from the right end: tail 0 rightmost, each tail's fields left to right;
//   - tail length in units = (head opcode mod 6) + 1, opcode = head[9:5];
//   - heads at most B/16, tail units at most B/8, and everything fits in the units.
package hat_tb_pkg;

  typedef struct {
    int         n;            // number of instructions
    logic [9:0] head [16];
    logic [29:0] tail [16];   // left-aligned, unused units zero
    int         len  [16];
  } binfo_t;

  function automatic int ref_len(logic [9:0] h);
    return (int'(h[9:5]) % 6) + 1;
  endfunction

  function automatic int g_inum(int b);   return (b == 128) ? 3 : 4;   endfunction
  function automatic int g_units(int b);  return (b == 128) ? 25 : 50; endfunction
  function automatic int g_tunits(int b); return (b == 128) ? 16 : 32; endfunction
  function automatic int g_maxi(int b);   return (b == 128) ? 8 : 16;  endfunction

  // Random bundle with up to nmax instructions (at least one).
  function automatic binfo_t rand_bundle(int b, int nmax);
    binfo_t bi;
    int want, tu, l;
    logic [9:0] h;
    logic [29:0] t;
    bi.n = 0;
    tu   = 0;
    for (int i = 0; i < 16; i++) begin
      bi.head[i] = '0; bi.tail[i] = '0; bi.len[i] = 0;
    end
    if (nmax > g_maxi(b)) nmax = g_maxi(b);
    want = 1 + int'($urandom % nmax);
    for (int i = 0; i < want; i++) begin
      // try a few opcodes, shorter tails if the bundle is nearly full
      for (int tries = 0; tries < 8; tries++) begin
        h = 10'($urandom);
        if (tries >= 4) h[9:5] = 5'(6 * ($urandom % 5));   // length 1
        l = ref_len(h);
        if (2 * (i + 1) + tu + l <= g_units(b) && tu + l <= g_tunits(b)) break;
        l = 0;
      end
      if (l == 0) break;
      t = 30'($urandom);
      t = (t >> (5 * (6 - l))) << (5 * (6 - l));
      bi.head[i] = h;
      bi.tail[i] = t;
      bi.len[i]  = l;
      tu += l;
      bi.n = i + 1;
    end
    return bi;
  endfunction

  // Offset, in units from the right end, of tail k's right end.
  function automatic int tail_off(binfo_t bi, int k);
    int s = 0;
    for (int i = 0; i < k; i++) s += bi.len[i];
    return s;
  endfunction

  // Pack into the low b bits of a 256-bit word.
  function automatic logic [255:0] pack(int b, binfo_t bi);
    logic [255:0] v;
    int inum, units, top, u, off;
    v     = '0;
    inum  = g_inum(b);
    units = g_units(b);
    top   = b - 1 - inum;             // top bit of unit 0
    for (int k = 0; k < inum; k++) v[b - inum + k] = 1'(((bi.n - 1) >> k) & 1);
    for (int i = 0; i < bi.n; i++) begin
      for (int k = 0; k < 10; k++) v[top - 10 * i - k] = bi.head[i][9 - k];
      off = tail_off(bi, i);
      u   = units - off - bi.len[i];  // leftmost unit of tail i
      for (int k = 0; k < 5 * bi.len[i]; k++) v[top - 5 * u - k] = bi.tail[i][29 - k];
    end
    return v;
  endfunction

  // Expected tail-start bit vector: bit (sum of lengths 0..i-1) for each tail i, i.e.
  // the tail's rightmost unit counted from the bundle's right end.
  function automatic logic [31:0] ref_tsbv(binfo_t bi);
    logic [31:0] v = '0;
    for (int i = 0; i < bi.n; i++) v[tail_off(bi, i)] = 1'b1;
    return v;
  endfunction

endpackage
