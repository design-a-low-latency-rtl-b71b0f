// tb_barrel_shifter: every shift amount 0..63 with random words and both
// fill values, against (d << amt) | fill mask; plus a 40-bit instance whose
// 6-bit amount can exceed the width (the word is then all fill).
module tb_barrel_shifter;
  localparam int W = 64;
  localparam int V = 40;
  logic [W-1:0] d, q;
  logic [5:0] amt;
  logic fill;
  logic [V-1:0] dv, qv;
  int checks = 0, failures = 0;

  barrel_shifter #(.W(W)) dut (.d(d), .amt(amt), .fill(fill), .q(q));
  barrel_shifter #(.W(V), .SW(6)) dutv (.d(dv), .amt(amt), .fill(fill), .q(qv));

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    for (int n = 0; n < 20; n++) begin
      for (int a = 0; a < 64; a++) begin
        logic [W-1:0] want;
        logic [V-1:0] wantv;
        d = {$urandom, $urandom};
        dv = V'({$urandom, $urandom});
        amt = 6'(a);
        fill = 1'($urandom);
        #1;
        want = d << a;
        if (fill) want = want | ((W'(1) << a) - 1);
        wantv = (a >= V) ? (fill ? '1 : '0) : (dv << a);
        if (fill && a < V) wantv = wantv | ((V'(1) << a) - 1);
        checks += 2;
        if (q !== want) begin
          failures++;
          $display("FAIL amt=%0d fill=%b d=%h q=%h want %h", a, fill, d, q, want);
        end
        if (qv !== wantv) begin
          failures++;
          $display("FAIL40 amt=%0d fill=%b d=%h q=%h want %h", a, fill, dv, qv, wantv);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
