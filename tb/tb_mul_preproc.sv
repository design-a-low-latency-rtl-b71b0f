// tb_mul_preproc: the 33-bit extended operand, read as a signed number, must
// equal the operand read as signed (flag 1) or unsigned (flag 0).
module tb_mul_preproc;
  logic [31:0] x;
  logic s;
  logic [32:0] xe;
  int checks = 0, failures = 0;
  mul_preproc dut (.s(s), .x(x), .xe(xe));
  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    for (int n = 0; n < 1000; n++) begin
      longint want;
      x = (n < 4) ? 32'(n * 32'h4000_0000) : $urandom;
      s = 1'($urandom);
      #1;
      want = s ? longint'(signed'(x)) : longint'({32'b0, x});
      checks++;
      if (longint'(signed'(xe)) != want) begin
        failures++;
        $display("FAIL x=%h s=%b xe=%h", x, s, xe);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
