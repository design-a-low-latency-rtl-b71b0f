// mul_preproc: sign preprocessing of one operand.
// The sign flag says how the W-bit operand is to be read: 1 = two's
// complement signed, 0 = unsigned. The operand is extended by one bit, the
// copy of its MSB when signed and 0 when unsigned, so that every operand
// becomes a (W+1)-bit two's complement number with the same value. A single
// signed array then serves signed x signed, signed x unsigned and unsigned x
// unsigned products, and a 2W-bit result holds each of them exactly.
// Purely combinational.
// The published block diagram feeds the sign into the pre-processing stage but
// does not say how it is used; the one-bit extension is this design's choice.
module mul_preproc #(
  parameter int unsigned W = mul_pkg::OPW
) (
  input  logic         s,        // 1: x is signed
  input  logic [W-1:0] x,
  output logic [W:0]   xe        // sign-extended operand
);
  always_comb xe = {s & x[W-1], x};
endmodule
