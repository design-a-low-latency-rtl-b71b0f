// tb_novel_mul: end-to-end test of the multiplier at its default size.
// A new operand pair is applied before every rising edge (full throughput);
// the product of the pair taken at edge n must be at c after edge n+1, which
// checks the two-edge latency and that consecutive operations do not mix.
// Products are checked against 64-bit integer multiplication of the operands
// read as signed or unsigned according to sa/sb; cout against the carry out
// of the last addition, tree sum + complemented negative row + 1.
// The first pair is the example a = 6, b = 2, sa = 1, sb = 0 (product 12).
// Coverage counters: each of the four signedness modes, the negative-weight
// last row (b negative), cout = 0 and cout = 1, and corner operands; a
// counter left at zero counts as a failure.
module tb_novel_mul;
  localparam int N = 3000;
  logic clk = 0;
  logic [31:0] a, b;
  logic sa, sb;
  logic [63:0] c;
  logic cout;
  int checks = 0, failures = 0;
  int mode_cnt[4] = '{0, 0, 0, 0};
  int neg_cnt = 0, cout1_cnt = 0, cout0_cnt = 0;

  logic [63:0] exp_c[$];
  logic        exp_cout[$];

  novel_mul dut (.clk(clk), .a(a), .b(b), .sa(sa), .sb(sb), .c(c), .cout(cout));

  always #5 clk = ~clk;

  initial begin
    repeat (N + 100) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic [63:0] ext64(logic [31:0] x, logic s);
    return s ? {{32{x[31]}}, x} : {32'b0, x};
  endfunction

  // reference carry: the product decomposed as (A * b[31:0]) plus the
  // complemented row for the sign bit of b plus 1
  function automatic logic ref_cout(logic [31:0] x, logic xs, logic [31:0] y, logic ys);
    logic [63:0] ax, sum_lo, row;
    logic        bneg;
    logic [64:0] tot;
    ax     = ext64(x, xs);
    sum_lo = ax * {32'b0, y};
    bneg   = ys & y[31];
    row    = bneg ? ~(ax << 32) : 64'd0;
    tot    = {1'b0, sum_lo} + {1'b0, row} + 65'(bneg);
    return tot[64];
  endfunction

  task automatic apply(logic [31:0] x, logic xs, logic [31:0] y, logic ys);
    a = x; sa = xs; b = y; sb = ys;
    exp_c.push_back(ext64(x, xs) * ext64(y, ys));
    exp_cout.push_back(ref_cout(x, xs, y, ys));
    mode_cnt[{xs, ys}]++;
    if (ys && y[31]) neg_cnt++;
  endtask

  // checker: after each rising edge, once two pairs have gone in
  int sent = 0, got = 0;
  always @(posedge clk) begin
    #1;
    if (sent >= 2 && got < sent - 1) begin
      logic [63:0] ec;
      logic        eco;
      ec  = exp_c.pop_front();
      eco = exp_cout.pop_front();
      checks += 2;
      if (c !== ec) begin
        failures++;
        $display("FAIL product #%0d: c=%h want %h", got, c, ec);
      end
      if (cout !== eco) begin
        failures++;
        $display("FAIL cout #%0d: %b want %b", got, cout, eco);
      end
      if (eco) cout1_cnt++; else cout0_cnt++;
      got++;
    end
  end

  initial begin
    static logic [31:0] corner[6] = '{32'h0, 32'h1, 32'hFFFF_FFFF, 32'h8000_0000,
                               32'h7FFF_FFFF, 32'h0000_0006};
    @(negedge clk);
    apply(32'd6, 1'b1, 32'd2, 1'b0);   // example pair
    sent++;
    for (int i = 0; i < 6; i++)
      for (int j = 0; j < 6; j++)
        for (int m = 0; m < 4; m++) begin
          @(negedge clk);
          apply(corner[i], m[1], corner[j], m[0]);
          sent++;
        end
    for (int n = 0; n < N - 145; n++) begin
      @(negedge clk);
      apply($urandom, 1'($urandom), $urandom, 1'($urandom));
      sent++;
    end
    // drain the pipeline
    @(negedge clk);
    apply(32'd0, 1'b0, 32'd0, 1'b0);
    sent++;
    repeat (3) @(negedge clk);
    $display("modes uu=%0d us=%0d su=%0d ss=%0d neg_row=%0d cout1=%0d cout0=%0d results=%0d",
             mode_cnt[0], mode_cnt[1], mode_cnt[2], mode_cnt[3],
             neg_cnt, cout1_cnt, cout0_cnt, got);
    for (int m = 0; m < 4; m++) if (mode_cnt[m] == 0) failures++;
    if (neg_cnt == 0) failures++;
    if (cout1_cnt == 0) failures++;
    if (cout0_cnt == 0) failures++;
    if (got < sent - 1) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
