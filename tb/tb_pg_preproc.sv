// tb_pg_preproc: random words; every bit of g must equal x AND y and every
// bit of p x XOR y, checked bit by bit.
module tb_pg_preproc;
  localparam int W = 64;
  logic [W-1:0] x, y, g, p;
  int checks = 0, failures = 0;
  pg_preproc #(.W(W)) dut (.x(x), .y(y), .g(g), .p(p));
  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    for (int n = 0; n < 200; n++) begin
      x = {$urandom, $urandom};
      y = {$urandom, $urandom};
      #1;
      for (int i = 0; i < W; i++) begin
        checks++;
        if (g[i] != (x[i] && y[i]) || p[i] != (x[i] != y[i])) begin
          failures++;
          $display("FAIL bit %0d x=%b y=%b g=%b p=%b", i, x[i], y[i], g[i], p[i]);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
