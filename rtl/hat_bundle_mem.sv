// hat_bundle_mem: instruction store of HAT bundles, with one tail-start bit vector
// (TSBV) per bundle.
//
// Code is held compressed, in bundles, exactly as in main memory: no instruction crosses
// a bundle, so none crosses a line or page boundary. When a bundle is written (the
// refill path), hat_tsbv_gen computes its TSBV. The vector goes into a side array. The
// bit vector therefore costs storage and refill logic, not code size. This store stands
// in for the instruction cache; the cache itself (tags, lines, miss handling) is not
// part of this design.
//
// Write: synchronous, one bundle per clock when wr_en is high. Read: combinational from
// rd_addr. No reset; a bundle reads as garbage until written.
module hat_bundle_mem
  import hat_pkg::*;
#(
  parameter int         BUNDLE_BITS = 256,
  parameter int         DEPTH       = 256,
  parameter len_table_t LEN_TABLE   = DEFAULT_LEN_TABLE,
  localparam int        ABITS       = $clog2(DEPTH),
  localparam int        TU          = tail_units(BUNDLE_BITS)
) (
  input  logic                   clk,
  input  logic                   wr_en,
  input  logic [ABITS-1:0]       wr_addr,
  input  logic [BUNDLE_BITS-1:0] wr_bundle,
  input  logic [ABITS-1:0]       rd_addr,
  output logic [BUNDLE_BITS-1:0] rd_bundle,
  output logic [TU-1:0]          rd_tsbv
);
  logic [BUNDLE_BITS-1:0] bundles [DEPTH];
  logic [TU-1:0]          vectors [DEPTH];
  logic [TU-1:0]          wr_tsbv;

  hat_tsbv_gen #(.BUNDLE_BITS(BUNDLE_BITS), .LEN_TABLE(LEN_TABLE)) u_gen (
    .bundle (wr_bundle),
    .tsbv   (wr_tsbv)
  );

  always_ff @(posedge clk) begin
    if (wr_en) begin
      bundles[wr_addr] <= wr_bundle;
      vectors[wr_addr] <= wr_tsbv;
    end
  end

  assign rd_bundle = bundles[rd_addr];
  assign rd_tsbv   = vectors[rd_addr];
endmodule
