// black_cell: prefix operator of the carry network.
// It merges the (generate, propagate) pair of an upper bit group (gi, pi)
// with that of the adjacent lower group (gj, pj) into the pair of the joint
// group: g = gi OR (pi AND gj), p = pi AND pj. Purely combinational.
// This is the published black cell, except that the AND term uses the lower
// group's generate gj, as a prefix operator must (a propagate there would not add).
module black_cell (
  input  logic gi, pi,    // upper group
  input  logic gj, pj,    // lower group
  output logic g, p
);
  always_comb begin
    g = gi | (pi & gj);
    p = pi & pj;
  end
endmodule
