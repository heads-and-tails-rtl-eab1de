// tb_hat_tail_align: random bundles (256- and 128-bit) are built from known tails. Each
// tail, addressed by its offset and length, must come out left-aligned and exact.
module tb_hat_tail_align;
  import hat_pkg::*;
  import hat_tb_pkg::*;

  logic [255:0] b256;
  logic [127:0] b128;
  toff_t        off256, off128;
  tlen_t        len256, len128;
  tail_t        tail256, tail128;
  int checks = 0, failures = 0;

  hat_tail_align #(.BUNDLE_BITS(256)) dut256 (.bundle(b256), .off(off256), .len(len256), .tail(tail256));
  hat_tail_align #(.BUNDLE_BITS(128)) dut128 (.bundle(b128), .off(off128), .len(len128), .tail(tail128));

  initial begin
    binfo_t bi, bj;
    logic [255:0] v;
    for (int t = 0; t < 400; t++) begin
      bi   = rand_bundle(256, 16);
      bj   = rand_bundle(128, 8);
      b256 = pack(256, bi);
      v    = pack(128, bj);
      b128 = v[127:0];
      for (int k = 0; k < 16; k++) begin
        if (k < bi.n) begin
          off256 = toff_t'(tail_off(bi, k));
          len256 = tlen_t'(bi.len[k]);
        end
        if (k < bj.n) begin
          off128 = toff_t'(tail_off(bj, k));
          len128 = tlen_t'(bj.len[k]);
        end
        #1;
        if (k < bi.n) begin
          checks++;
          if (tail256 !== bi.tail[k]) begin
            failures++;
            if (failures < 10) $display("FAIL 256 k=%0d got=%h exp=%h", k, tail256, bi.tail[k]);
          end
        end
        if (k < bj.n) begin
          checks++;
          if (tail128 !== bj.tail[k]) begin
            failures++;
            if (failures < 10) $display("FAIL 128 k=%0d got=%h exp=%h", k, tail128, bj.tail[k]);
          end
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
