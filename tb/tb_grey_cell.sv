// tb_grey_cell: exhaustive check of the grey cell, g = gi | (pi & gj).
module tb_grey_cell;
  logic gi, pi, gj, g;
  int checks = 0, failures = 0;
  grey_cell dut (.gi(gi), .pi(pi), .gj(gj), .g(g));
  initial begin
    #1000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    for (int v = 0; v < 8; v++) begin
      {gi, pi, gj} = 3'(v);
      #1;
      checks++;
      if (g !== (v[2] || (v[1] && v[0]))) begin
        failures++;
        $display("FAIL v=%b g=%b", v[2:0], g);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
