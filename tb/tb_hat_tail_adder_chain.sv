// tb_hat_tail_adder_chain: random check of the tail-length adder chain (N = 4 and N = 16).
// Each slot's offset must equal base plus the lengths of all earlier slots.
module tb_hat_tail_adder_chain;
  import hat_pkg::*;

  toff_t          base4, base16;
  tlen_t [3:0]    len4;
  tlen_t [15:0]   len16;
  toff_t [3:0]    off4;
  toff_t [15:0]   off16;
  toff_t          nxt4, nxt16;
  int checks = 0, failures = 0;

  hat_tail_adder_chain #(.N(4))  dut4  (.base(base4),  .len(len4),  .off(off4),  .next_off(nxt4));
  hat_tail_adder_chain #(.N(16)) dut16 (.base(base16), .len(len16), .off(off16), .next_off(nxt16));

  task automatic chk(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL %s", what);
    end
  endtask

  initial begin
    int s;
    for (int t = 0; t < 2000; t++) begin
      base4 = toff_t'($urandom % 9);
      for (int i = 0; i < 4; i++) len4[i] = tlen_t'(1 + $urandom % 6);
      base16 = '0;
      for (int i = 0; i < 16; i++) len16[i] = tlen_t'(1 + $urandom % 2);
      #1;
      s = int'(base4);
      for (int i = 0; i < 4; i++) begin
        chk(int'(off4[i]) == s, $sformatf("N=4 slot %0d off=%0d exp=%0d", i, off4[i], s));
        s += int'(len4[i]);
      end
      chk(int'(nxt4) == s, "N=4 next_off");
      s = 0;
      for (int i = 0; i < 16; i++) begin
        chk(int'(off16[i]) == s, $sformatf("N=16 slot %0d", i));
        s += int'(len16[i]);
      end
      chk(int'(nxt16) == s, "N=16 next_off");
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
