// pp_adder_tree: the parallel adder structure that sums N aligned partial
// products. N is padded to the next power of two with zero rows; the rows
// are then added pairwise by prefix adders, level by level, in a balanced
// binary tree of log2(N) levels, all adders of a level working in parallel.
// Sums are kept modulo 2^W (carries out of the tree adders are dropped,
// which is exact for two's complement rows). With N = 32 the second level
// holds eight 4-row group sums. Purely combinational.
// The published description only says the aligned partial products go to a
// parallel adder structure; the balanced tree of carry-propagate prefix adders is
// this design's choice.
module pp_adder_tree #(
  parameter int unsigned N = mul_pkg::OPW,
  parameter int unsigned W = mul_pkg::PW
) (
  input  logic [N-1:0][W-1:0] rows,
  output logic [W-1:0]        sum
);
  localparam int unsigned L = (N > 1) ? $clog2(N) : 1;
  localparam int unsigned M = 2 ** L;

  // node[0 .. M-1] are the leaves, node[M + ...] the adder outputs,
  // level by level; node[2M-2] is the root.
  logic [2*M-2:0][W-1:0] node;

  for (genvar i = 0; i < M; i++) begin : g_leaf
    if (i < N) begin : g_row
      assign node[i] = rows[i];
    end else begin : g_pad
      assign node[i] = '0;
    end
  end

  for (genvar n = 0; n < M - 1; n++) begin : g_add
    // adder n reads nodes 2n and 2n+1 and writes node M + n
    logic unused_cout;
    prefix_adder #(.W(W)) u_add (
      .x(node[2*n]), .y(node[2*n+1]), .cin(1'b0),
      .s(node[M+n]), .cout(unused_cout));
  end

  assign sum = node[2*M-2];
endmodule
