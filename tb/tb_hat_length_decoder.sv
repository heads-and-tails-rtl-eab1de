// tb_hat_length_decoder: exhaustive check of the head-length decoder.
// Every 10-bit head is applied; the tail length must equal (opcode mod 6) + 1 and no
// head of the default table may be flagged illegal.
module tb_hat_length_decoder;
  import hat_pkg::*;
  import hat_tb_pkg::*;

  head_t head;
  tlen_t tail_len;
  logic  illegal;
  int    checks = 0, failures = 0;

  hat_length_decoder dut (.head, .tail_len, .illegal);

  initial begin
    for (int h = 0; h < 1024; h++) begin
      head = head_t'(h);
      #1;
      checks++;
      if (int'(tail_len) != ref_len(head) || illegal) begin
        failures++;
        if (failures < 10) $display("FAIL head=%h len=%0d exp=%0d illegal=%b", head, tail_len, ref_len(head), illegal);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
