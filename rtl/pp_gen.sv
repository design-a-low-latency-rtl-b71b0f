// pp_gen: partial product generator.
// For each bit j of the extended multiplier be, the partial product is the
// extended multiplicand ae sign-extended to PW bits and ANDed with be[j]
// (the shift-and-add rule: multiplier bit j selects the multiplicand). The
// rows leave unshifted; the barrel shifters place row j at weight 2^j.
// The MSB of be has negative weight in two's complement, so its row is
// emitted inverted (~ae when be[XW-1] = 1, else 0) together with
// neg = be[XW-1]. The shifter fills the low bits of that row with neg, and
// neg is also the carry-in of the final adder; row + 1 then equals the
// subtracted term -(ae << (XW-1)). Purely combinational.
// One partial product per multiplier bit follows the published method; the
// handling of the negative-weight row is this design's own.
module pp_gen #(
  parameter int unsigned XW = mul_pkg::XW,
  parameter int unsigned PW = mul_pkg::PW
) (
  input  logic [XW-1:0]         ae,    // extended multiplicand
  input  logic [XW-1:0]         be,    // extended multiplier
  output logic [XW-1:0][PW-1:0] pp,    // unshifted partial products
  output logic                  neg    // last row is negated
);
  logic [PW-1:0] ax;
  always_comb begin
    ax = {{(PW-XW){ae[XW-1]}}, ae};
    for (int j = 0; j < XW - 1; j++)
      pp[j] = be[j] ? ax : '0;
    pp[XW-1] = be[XW-1] ? ~ax : '0;
    neg      = be[XW-1];
  end
endmodule
