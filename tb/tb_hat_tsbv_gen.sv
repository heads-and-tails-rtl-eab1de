// tb_hat_tsbv_gen: the tail-start bit vector of random 256- and 128-bit bundles must
// have exactly one bit set per instruction, at the rightmost unit of each tail.
module tb_hat_tsbv_gen;
  import hat_pkg::*;
  import hat_tb_pkg::*;

  logic [255:0] b256;
  logic [127:0] b128;
  logic [31:0]  v256;
  logic [15:0]  v128;
  int checks = 0, failures = 0;

  hat_tsbv_gen #(.BUNDLE_BITS(256)) dut256 (.bundle(b256), .tsbv(v256));
  hat_tsbv_gen #(.BUNDLE_BITS(128)) dut128 (.bundle(b128), .tsbv(v128));

  initial begin
    binfo_t bi, bj;
    logic [255:0] w;
    logic [31:0]  e;
    for (int t = 0; t < 2000; t++) begin
      bi   = rand_bundle(256, 16);
      bj   = rand_bundle(128, 8);
      b256 = pack(256, bi);
      w    = pack(128, bj);
      b128 = w[127:0];
      #1;
      checks++;
      if (v256 !== ref_tsbv(bi)) begin
        failures++;
        if (failures < 10) $display("FAIL 256 n=%0d got=%b exp=%b", bi.n, v256, ref_tsbv(bi));
      end
      e = ref_tsbv(bj);
      checks++;
      if (v128 !== e[15:0]) begin
        failures++;
        if (failures < 10) $display("FAIL 128 n=%0d got=%b exp=%b", bj.n, v128, e[15:0]);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
