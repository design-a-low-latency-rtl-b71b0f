// tb_black_cell: exhaustive check of the black cell against the prefix
// operator g = gi | (pi & gj), p = pi & pj over all 16 input combinations.
module tb_black_cell;
  logic gi, pi, gj, pj, g, p;
  int checks = 0, failures = 0;
  black_cell dut (.gi(gi), .pi(pi), .gj(gj), .pj(pj), .g(g), .p(p));
  initial begin
    #1000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    for (int v = 0; v < 16; v++) begin
      {gi, pi, gj, pj} = 4'(v);
      #1;
      checks++;
      // group generate: upper group generates, or propagates a lower generate
      if (g !== (v[3] || (v[2] && v[1])) || p !== (v[2] && v[0])) begin
        failures++;
        $display("FAIL v=%b g=%b p=%b", v[3:0], g, p);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
