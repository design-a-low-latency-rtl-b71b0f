// tb_result_reg: product and carry must appear one clock edge after they are
// applied and hold between edges.
module tb_result_reg;
  logic clk = 0;
  logic [63:0] d, q;
  logic dc, qc;
  int checks = 0, failures = 0;
  result_reg dut (.clk(clk), .d(d), .d_cout(dc), .q(q), .q_cout(qc));
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
      logic [63:0] dv;
      logic cv;
      dv = {$urandom, $urandom}; cv = 1'($urandom);
      @(negedge clk);
      d = dv; dc = cv;
      @(posedge clk);
      #1;
      d = ~dv; dc = ~cv;
      #1;
      checks++;
      if (q !== dv || qc !== cv) begin
        failures++;
        $display("FAIL q=%h/%b want %h/%b", q, qc, dv, cv);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
