// barrel_shifter: logarithmic left shifter with a fill bit.
// The word d is shifted left by amt places through $clog2(W) levels of
// 2:1 multiplexers (level k shifts by 2^k when amt[k] is set); vacated low
// bits take the value of fill. Combinational only. In the multiplier each
// partial product passes through one shifter with its row index as amt, which
// aligns it at its weight before the adder tree.
// A purely combinational shifter that aligns the partial products follows the
// published description; the fill bit is this design's addition.
module barrel_shifter #(
  parameter int unsigned W  = mul_pkg::PW,
  parameter int unsigned SW = $clog2(W)
) (
  input  logic [W-1:0]  d,
  input  logic [SW-1:0] amt,
  input  logic          fill,
  output logic [W-1:0]  q
);
  logic [SW:0][W-1:0] lvl;
  assign lvl[0] = d;
  for (genvar k = 0; k < SW; k++) begin : g_lvl
    localparam int unsigned D = 2 ** k;
    if (D < W) begin : g_sh
      assign lvl[k+1] = amt[k] ? {lvl[k][W-1-D:0], {D{fill}}} : lvl[k];
    end else begin : g_all
      assign lvl[k+1] = amt[k] ? {W{fill}} : lvl[k];
    end
  end
  assign q = lvl[SW];
endmodule
