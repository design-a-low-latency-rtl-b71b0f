// grey_cell: reduced prefix operator of the carry network.
// Used where the joint group reaches bit 0, so only its generate signal (the
// carry out of that bit) is needed: g = gi OR (pi AND gj). Purely
// combinational.
// This is the published grey cell, with the lower group's generate in the AND
// term as in black_cell.
module grey_cell (
  input  logic gi, pi,    // upper group
  input  logic gj,        // lower group, reaching bit 0
  output logic g
);
  always_comb g = gi | (pi & gj);
endmodule
