// sum_postproc: post-processing stage of a parallel prefix adder.
// From the bit propagate signals p and the carries c (c[i] is the carry out
// of bit i, the group generate of bits i..0) it forms the sum
// s[i] = p[i] XOR c[i-1], with cin in place of c[-1], and the carry out
// cout = c[W-1]. Purely combinational.
// Both equations follow the published post-processing stage; the carry-in is
// this design's addition.
module sum_postproc #(
  parameter int unsigned W = mul_pkg::PW
) (
  input  logic [W-1:0] p,
  input  logic [W-1:0] c,
  input  logic         cin,
  output logic [W-1:0] s,
  output logic         cout
);
  always_comb begin
    s    = p ^ {c[W-2:0], cin};
    cout = c[W-1];
  end
endmodule
