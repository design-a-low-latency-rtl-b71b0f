// result_reg: the result register at the output of the multiplier.
// It stores the product and the carry out of the final addition on every
// rising clock edge. No reset and no enable, as the multiplier's interface
// has neither.
// The result register is named in the published description; its timing is
// this design's choice.
module result_reg #(
  parameter int unsigned W = mul_pkg::PW
) (
  input  logic         clk,
  input  logic [W-1:0] d,
  input  logic         d_cout,
  output logic [W-1:0] q,
  output logic         q_cout
);
  always_ff @(posedge clk) begin
    q      <= d;
    q_cout <= d_cout;
  end
endmodule
