// operand_reg: one operand register and its sign flag (the "A Register" /
// "A Sign" pair, and likewise for B, at the input of the multiplier).
// Both are loaded on every rising clock edge, so a new operand pair can
// enter the multiplier each cycle. There is no reset and no enable, because
// the multiplier's interface has neither; the registered value is valid one
// clock after the inputs are applied.
// The operand/sign register pair follows the published block diagram; loading
// on every edge without reset is this design's choice.
module operand_reg #(
  parameter int unsigned W = mul_pkg::OPW
) (
  input  logic         clk,
  input  logic [W-1:0] d,        // operand value
  input  logic         s,        // 1: operand is two's complement signed
  output logic [W-1:0] q,
  output logic         q_s
);
  always_ff @(posedge clk) begin
    q   <= d;
    q_s <= s;
  end
endmodule
