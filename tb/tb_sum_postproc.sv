// tb_sum_postproc: random propagate and carry words; s[i] must be
// p[i] XOR c[i-1] (cin at bit 0) and cout the top carry.
module tb_sum_postproc;
  localparam int W = 64;
  logic [W-1:0] p, c, s;
  logic cin, cout;
  int checks = 0, failures = 0;
  sum_postproc #(.W(W)) dut (.p(p), .c(c), .cin(cin), .s(s), .cout(cout));
  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    for (int n = 0; n < 200; n++) begin
      p = {$urandom, $urandom};
      c = {$urandom, $urandom};
      cin = 1'($urandom);
      #1;
      for (int i = 0; i < W; i++) begin
        logic cm1;
        cm1 = (i == 0) ? cin : c[i-1];
        checks++;
        if (s[i] != (p[i] ^ cm1)) begin
          failures++;
          $display("FAIL sum bit %0d", i);
        end
      end
      checks++;
      if (cout != c[W-1]) begin
        failures++;
        $display("FAIL cout");
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
