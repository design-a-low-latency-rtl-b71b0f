// tb_prefix_adder: the 64-bit prefix adder and a 13-bit one (a width that
// is not a power of two) against the behavioural sum {cout, s} = x + y + cin,
// with random operands and the carry-chain corner cases (all-ones plus one,
// alternating patterns).
module tb_prefix_adder;
  localparam int W = 64;
  localparam int V = 13;
  logic [W-1:0] x, y, s;
  logic cin, cout;
  logic [V-1:0] xv, yv, sv;
  logic cinv, coutv;
  int checks = 0, failures = 0;

  prefix_adder #(.W(W)) dut  (.x(x), .y(y), .cin(cin), .s(s), .cout(cout));
  prefix_adder #(.W(V)) dut13 (.x(xv), .y(yv), .cin(cinv), .s(sv), .cout(coutv));

  task automatic check();
    logic [W:0] ref64;
    logic [V:0] ref13;
    #1;
    ref64 = {1'b0, x} + {1'b0, y} + (W+1)'(cin);
    ref13 = {1'b0, xv} + {1'b0, yv} + (V+1)'(cinv);
    checks += 2;
    if ({cout, s} !== ref64) begin
      failures++;
      $display("FAIL64 %h + %h + %b = %b_%h, want %h", x, y, cin, cout, s, ref64);
    end
    if ({coutv, sv} !== ref13) begin
      failures++;
      $display("FAIL13 %h + %h + %b = %b_%h, want %h", xv, yv, cinv, coutv, sv, ref13);
    end
  endtask

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    x = '1; y = '0; cin = 1; xv = '1; yv = '0; cinv = 1; check();
    x = '1; y = '1; cin = 1; xv = '1; yv = '1; cinv = 1; check();
    x = {32{2'b10}}; y = {32{2'b01}}; cin = 1;
    xv = 13'h0AAA; yv = 13'h1555; cinv = 1; check();
    x = 64'h8000_0000_0000_0000; y = x; cin = 0;
    xv = 13'h1000; yv = 13'h1000; cinv = 0; check();
    for (int n = 0; n < 2000; n++) begin
      x = {$urandom, $urandom};
      y = {$urandom, $urandom};
      cin = 1'($urandom);
      xv = 13'($urandom); yv = 13'($urandom); cinv = 1'($urandom);
      check();
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
