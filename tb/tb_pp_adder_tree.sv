// tb_pp_adder_tree: the 32-row, 64-bit tree and a 5-row tree (padded to 8)
// against a behavioural sum modulo 2^64, with random rows and all-ones rows.
module tb_pp_adder_tree;
  logic [31:0][63:0] rows;
  logic [4:0][63:0] rows5;
  logic [63:0] sum, sum5;
  int checks = 0, failures = 0;
  pp_adder_tree dut (.rows(rows), .sum(sum));
  pp_adder_tree #(.N(5), .W(64)) dut5 (.rows(rows5), .sum(sum5));
  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    for (int n = 0; n < 300; n++) begin
      logic [63:0] want, want5;
      want = '0; want5 = '0;
      for (int j = 0; j < 32; j++) begin
        rows[j] = (n == 0) ? '1 : {$urandom, $urandom};
        want = want + rows[j];
      end
      for (int j = 0; j < 5; j++) begin
        rows5[j] = {$urandom, $urandom};
        want5 = want5 + rows5[j];
      end
      #1;
      checks += 2;
      if (sum !== want) begin
        failures++;
        $display("FAIL32 %h want %h", sum, want);
      end
      if (sum5 !== want5) begin
        failures++;
        $display("FAIL5 %h want %h", sum5, want5);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
