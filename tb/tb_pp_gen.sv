// tb_pp_gen: each row j < 32 must be the 64-bit sign extension of ae when
// be[j] is set and zero otherwise; row 32 its complement when be[32] is set,
// with neg = be[32]. A second check sums the rows at their weights (row 32
// plus one, negative weight) and compares with the signed product ae * be.
module tb_pp_gen;
  logic [32:0] ae, be;
  logic [32:0][63:0] pp;
  logic neg;
  int checks = 0, failures = 0;
  pp_gen dut (.ae(ae), .be(be), .pp(pp), .neg(neg));
  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    for (int n = 0; n < 500; n++) begin
      logic [63:0] ax, acc, want;
      ae = {1'($urandom), $urandom};
      be = {1'($urandom), $urandom};
      #1;
      ax = {{31{ae[32]}}, ae};
      acc = '0;
      for (int j = 0; j < 33; j++) begin
        logic [63:0] wr;
        wr = (j < 32) ? (be[j] ? ax : 64'd0) : (be[j] ? ~ax : 64'd0);
        checks++;
        if (pp[j] !== wr) begin
          failures++;
          $display("FAIL row %0d", j);
        end
        if (j < 32) acc = acc + (pp[j] << j);
        else        acc = acc + ((pp[j] << j) | (neg ? 64'hFFFF_FFFF : 64'd0)) + 64'(neg);
      end
      want = 64'(longint'(signed'(ae)) * longint'(signed'(be)));
      checks += 2;
      if (neg !== be[32]) begin
        failures++;
        $display("FAIL neg");
      end
      if (acc !== want) begin
        failures++;
        $display("FAIL sum %h want %h", acc, want);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
