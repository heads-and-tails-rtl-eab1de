// tb_hat_tsbv_locator: for random bundles, the vector is formed from the known tail
// lengths. For every instruction # the locator must return the summed tail length of
// all earlier instructions, and report not-found for instruction #s past the last.
module tb_hat_tsbv_locator;
  import hat_pkg::*;
  import hat_tb_pkg::*;

  logic [31:0] tsbv;
  logic [3:0]  inst;
  toff_t       off;
  logic        found;
  int checks = 0, failures = 0;

  hat_tsbv_locator #(.BUNDLE_BITS(256)) dut (.tsbv, .inst, .off, .found);

  initial begin
    binfo_t bi;
    for (int t = 0; t < 1000; t++) begin
      bi   = rand_bundle(256, 16);
      tsbv = ref_tsbv(bi);
      for (int k = 0; k < 16; k++) begin
        inst = 4'(k);
        #1;
        checks++;
        if (k < bi.n) begin
          if (!found || int'(off) != tail_off(bi, k)) begin
            failures++;
            if (failures < 10) $display("FAIL k=%0d off=%0d exp=%0d found=%b", k, off, tail_off(bi, k), found);
          end
        end else if (found) begin
          failures++;
          if (failures < 10) $display("FAIL k=%0d beyond last (n=%0d) but found", k, bi.n);
        end
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
