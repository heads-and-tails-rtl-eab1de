// hat_btb: tail-pointer part of a branch target buffer for HAT branches.
//
// A branch into the middle of a bundle finds its target head at once but not the
// target's tail. This buffer remembers, per branch target PC {bundle #, instruction #},
// the offset of the target's tail (in 5-bit units from the bundle's right end). It
// costs no code size, only BTB bits. On a miss the front end falls back to scanning the
// bundle's heads from instruction 0 and writes the offset found here.
//
// Organisation (this design's choice): direct-mapped with ENTRIES entries, indexed by
// the low PC bits (instruction # and low bundle # bits), tagged with the rest. Lookup is
// combinational. A write takes effect at the next clock edge. `flush` clears every
// entry. The front end flushes on a refill, because new code makes stored offsets stale.
// Reset is synchronous, active low.
module hat_btb
  import hat_pkg::*;
#(
  parameter int ENTRIES = 16,
  parameter int PC_BITS = 12
) (
  input  logic               clk,
  input  logic               rst_n,
  input  logic               flush,
  input  logic [PC_BITS-1:0] lookup_pc,
  output logic               hit,
  output toff_t              off,
  input  logic               wr_en,
  input  logic [PC_BITS-1:0] wr_pc,
  input  toff_t              wr_off
);
  localparam int IBITS = $clog2(ENTRIES);
  localparam int TBITS = PC_BITS - IBITS;

  typedef struct packed {
    logic              valid;
    logic [TBITS-1:0]  tag;
    toff_t             off;
  } entry_t;

  entry_t table_q [ENTRIES];
  entry_t rd;

  always_comb begin
    rd  = table_q[lookup_pc[IBITS-1:0]];
    hit = rd.valid && (rd.tag == lookup_pc[PC_BITS-1:IBITS]);
    off = rd.off;
  end

  always_ff @(posedge clk) begin
    if (!rst_n || flush) begin
      for (int e = 0; e < ENTRIES; e++) table_q[e] <= '0;
    end else if (wr_en) begin
      table_q[wr_pc[IBITS-1:0]] <= '{valid: 1'b1, tag: wr_pc[PC_BITS-1:IBITS], off: wr_off};
    end
  end
endmodule
