// tb_operand_reg: the register must show each value and sign flag one clock
// edge after they are applied, and hold them between edges.
module tb_operand_reg;
  logic clk = 0;
  logic [31:0] d, q;
  logic s, q_s;
  int checks = 0, failures = 0;
  operand_reg dut (.clk(clk), .d(d), .s(s), .q(q), .q_s(q_s));
  always #5 clk = ~clk;
  initial begin
    repeat (1000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    for (int n = 0; n < 100; n++) begin
      logic [31:0] dv;
      logic sv;
      dv = $urandom; sv = 1'($urandom);
      @(negedge clk);
      d = dv; s = sv;
      @(posedge clk);
      #1;
      // new values may not appear before the edge, and must after it
      d = ~dv; s = ~sv;   // changes between edges must not pass through
      #1;
      checks++;
      if (q !== dv || q_s !== sv) begin
        failures++;
        $display("FAIL q=%h/%b want %h/%b", q, q_s, dv, sv);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
