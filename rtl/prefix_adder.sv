// prefix_adder: W-bit parallel prefix adder with carry-in.
// Three stages: pg_preproc forms bit generate/propagate signals; a
// Kogge-Stone carry network of log2(W) levels combines them, level k joining
// each position i with position i - 2^k; sum_postproc forms the sum bits and
// the carry out. A grey cell is used where the joint group reaches bit 0 and a
// black cell elsewhere. The carry-in enters as the generate of a virtual bit
// -1, through one grey cell at bit 0 ahead of the network. Purely
// combinational; the delay grows with log2(W).
// The three stages and the two cell types follow the published parallel adder;
// the Kogge-Stone topology and the carry-in are this design's choices.
// W must be at least 2.
module prefix_adder #(
  parameter int unsigned W = mul_pkg::PW
) (
  input  logic [W-1:0] x,
  input  logic [W-1:0] y,
  input  logic         cin,
  output logic [W-1:0] s,
  output logic         cout
);
  localparam int unsigned L = $clog2(W);

  logic [W-1:0]      gb, pb;     // bit generate / propagate
  logic [L:0][W-1:0] gl;         // group generates after each level
  logic [L-1:0][W-1:0] pl;       // group propagates (the last level needs none)

  pg_preproc #(.W(W)) u_pre (.x(x), .y(y), .g(gb), .p(pb));

  // carry-in folded into bit 0
  grey_cell u_cin (.gi(gb[0]), .pi(pb[0]), .gj(cin), .g(gl[0][0]));
  assign pl[0][0] = pb[0];
  if (W > 1) begin : g_l0
    assign gl[0][W-1:1] = gb[W-1:1];
    assign pl[0][W-1:1] = pb[W-1:1];
  end

  for (genvar k = 0; k < L; k++) begin : g_lvl
    localparam int unsigned D = 2 ** k;
    for (genvar i = 0; i < W; i++) begin : g_bit
      if (i < D) begin : g_pass
        assign gl[k+1][i] = gl[k][i];
        if (k + 1 < L) begin : g_p
          assign pl[k+1][i] = pl[k][i];
        end
      end else if (i < 2 * D) begin : g_grey
        grey_cell u_g (.gi(gl[k][i]), .pi(pl[k][i]), .gj(gl[k][i-D]),
                       .g(gl[k+1][i]));
        if (k + 1 < L) begin : g_p
          assign pl[k+1][i] = pl[k][i];
        end
      end else begin : g_black
        // never at the last level, where every group reaches bit 0
        black_cell u_b (.gi(gl[k][i]), .pi(pl[k][i]),
                        .gj(gl[k][i-D]), .pj(pl[k][i-D]),
                        .g(gl[k+1][i]), .p(pl[k+1][i]));
      end
    end
  end

  sum_postproc #(.W(W)) u_post (.p(pb), .c(gl[L]), .cin(cin), .s(s), .cout(cout));
endmodule
