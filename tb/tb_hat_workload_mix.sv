// tb_hat_workload_mix: runs a 1000-instruction program with the MIPS-HAT size mix
// through front ends with 256-bit and 128-bit bundles (see hat_mix_runner).
// Besides the per-instruction and decode-rate checks of the runners, it reports the
// static size of the packed code relative to 32-bit instructions. It checks that
// 128-bit bundles pack worse than 256-bit ones (more field overhead and more unused
// space per bundle). The mix alone averages 24.2 bits per instruction, 75.8% of 32
// bits, before any bundle overhead. The reported ratios cover packing only, not the
// instruction-count changes of a real compressor.
module tb_hat_workload_mix;
  localparam int NINSTR = 1000;

  logic clk = 0;
  logic done256, done128;
  int   checks256, failures256, nb256, checks128, failures128, nb128;
  int   checks, failures;

  always #5 clk = ~clk;

  hat_mix_runner #(.B(256), .NINSTR(NINSTR)) r256 (.clk, .done(done256), .checks(checks256), .failures(failures256), .bundles_used(nb256));
  hat_mix_runner #(.B(128), .NINSTR(NINSTR)) r128 (.clk, .done(done128), .checks(checks128), .failures(failures128), .bundles_used(nb128));

  initial begin
    int pm256, pm128;
    wait (done256 && done128);
    checks   = checks256 + checks128 + 1;
    failures = failures256 + failures128;
    pm256 = (nb256 * 256 * 1000) / (NINSTR * 32);
    pm128 = (nb128 * 128 * 1000) / (NINSTR * 32);
    $display("static size vs 32-bit code: 256-bit bundles %0d.%0d%%, 128-bit bundles %0d.%0d%%",
             pm256 / 10, pm256 % 10, pm128 / 10, pm128 % 10);
    if (!(pm256 < pm128)) begin
      failures++;
      $display("FAIL 128-bit bundles did not pack worse than 256-bit ones");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #10000000;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks256 + checks128, failures256 + failures128 + 1);
    $finish;
  end
endmodule
