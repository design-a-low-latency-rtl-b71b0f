// pg_preproc: pre-processing stage of a parallel prefix adder.
// For every bit position i of the two addends x and y it forms the generate
// signal g[i] = x[i] AND y[i] and the propagate signal p[i] = x[i] XOR y[i].
// Purely combinational.
// The two equations follow the published pre-processing stage.
module pg_preproc #(
  parameter int unsigned W = mul_pkg::PW
) (
  input  logic [W-1:0] x,
  input  logic [W-1:0] y,
  output logic [W-1:0] g,
  output logic [W-1:0] p
);
  always_comb begin
    g = x & y;
    p = x ^ y;
  end
endmodule
