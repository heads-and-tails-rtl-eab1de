// tb_hat_slot_decoder: random 256-bit bundles built from known instructions are decoded
// from every starting instruction # with the right tail offset. Each slot's head,
// tail length, tail offset, aligned tail and in-bundle flag, the bundle's last
// instruction # and the offset handed to the next group are compared with the fields
// the bundle was built from.
module tb_hat_slot_decoder;
  import hat_pkg::*;
  import hat_tb_pkg::*;

  localparam int W = 4;

  logic [255:0]       bundle;
  logic [3:0]         inst, last;
  toff_t              base_off, next_off;
  logic [W-1:0]       in_bundle, slot_illegal;
  logic [W-1:0][3:0]  slot_inst;
  head_t [W-1:0]      slot_head;
  tlen_t [W-1:0]      slot_len;
  toff_t [W-1:0]      slot_off;
  tail_t [W-1:0]      slot_tail;
  int checks = 0, failures = 0;

  hat_slot_decoder #(.BUNDLE_BITS(256), .W(W)) dut (
    .bundle, .inst, .base_off, .last, .in_bundle, .slot_inst, .slot_head, .slot_len,
    .slot_off, .slot_tail, .slot_illegal, .next_off
  );

  task automatic chk(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL %s", what);
    end
  endtask

  initial begin
    binfo_t bi;
    int k;
    for (int t = 0; t < 300; t++) begin
      bi     = rand_bundle(256, 16);
      bundle = pack(256, bi);
      for (int s = 0; s < bi.n; s++) begin
        inst     = 4'(s);
        base_off = toff_t'(tail_off(bi, s));
        #1;
        chk(int'(last) == bi.n - 1, "last");
        for (int i = 0; i < W; i++) begin
          k = s + i;
          chk(in_bundle[i] == (k < bi.n), $sformatf("in_bundle t=%0d s=%0d i=%0d", t, s, i));
          if (k < bi.n) begin
            chk(slot_head[i] == bi.head[k], $sformatf("head t=%0d k=%0d", t, k));
            chk(int'(slot_len[i]) == bi.len[k], $sformatf("len k=%0d", k));
            chk(int'(slot_off[i]) == tail_off(bi, k), $sformatf("off k=%0d", k));
            chk(slot_tail[i] == bi.tail[k], $sformatf("tail t=%0d k=%0d got=%h exp=%h", t, k, slot_tail[i], bi.tail[k]));
            chk(!slot_illegal[i], "illegal");
          end
        end
        if (s + W <= bi.n) chk(int'(next_off) == tail_off(bi, s + W), "next_off");
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
