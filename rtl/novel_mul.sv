// novel_mul: 32 x 32 multiplier for signed and unsigned operands.
// sa and sb say whether a and b are two's complement signed (1) or unsigned
// (0); c is the exact 64-bit product in every one of the four combinations.
//
// Data path, one stage per block:
//   operand registers  a/sa and b/sb are registered (operand_reg)
//   sign preprocessing each operand is extended to 33 bits (mul_preproc)
//   partial products   33 rows, one per bit of extended b (pp_gen)
//   barrel shifters    row j is shifted left by j (barrel_shifter)
//   parallel adders    rows 0..31 are summed by a tree of Kogge-Stone prefix
//                      adders (pp_adder_tree)
//   post processing    the final prefix adder adds the negative-weight row 32
//                      with its +1 carry-in (prefix_adder)
//   result register    product and carry out are registered (result_reg)
//
// Timing: the inputs are taken at a rising clock edge and the product
// appears at c after the next rising edge, a latency of two clock edges;
// a new operand pair can be applied every cycle. There is no reset: the
// outputs are meaningful from the second edge after the first operands.
// cout is the carry out of the final adder. It is not a product bit (c is
// already exact) and is reported because the final adder produces it.
//
// The stage order, the port names and widths, and the adder equations follow
// the published design. The meaning of sa/sb (signedness, not sign), the
// treatment of signed partial products, the adder topology and tree, and the
// register placement are this design's own choices.
module novel_mul
  import mul_pkg::*;
(
  input  logic           clk,
  input  logic [OPW-1:0] a,
  input  logic [OPW-1:0] b,
  input  logic           sa,
  input  logic           sb,
  output logic [PW-1:0]  c,
  output logic           cout
);
  localparam int unsigned SW = $clog2(PW);

  logic [OPW-1:0]          a_q, b_q;
  logic                    sa_q, sb_q;
  logic [XW-1:0]           ae, be;
  logic [NPP-1:0][PW-1:0]  pp, pp_al;
  logic                    neg;
  logic [OPW-1:0][PW-1:0]  pos_rows;
  logic [PW-1:0]           tree_sum, prod;
  logic                    prod_cout;

  operand_reg #(.W(OPW)) u_areg (.clk(clk), .d(a), .s(sa), .q(a_q), .q_s(sa_q));
  operand_reg #(.W(OPW)) u_breg (.clk(clk), .d(b), .s(sb), .q(b_q), .q_s(sb_q));

  mul_preproc #(.W(OPW)) u_apre (.s(sa_q), .x(a_q), .xe(ae));
  mul_preproc #(.W(OPW)) u_bpre (.s(sb_q), .x(b_q), .xe(be));

  pp_gen #(.XW(XW), .PW(PW)) u_ppg (.ae(ae), .be(be), .pp(pp), .neg(neg));

  for (genvar j = 0; j < NPP; j++) begin : g_align
    localparam logic [SW-1:0] AMT = SW'(j);
    // only the negated last row is filled, with ones when it is active
    barrel_shifter #(.W(PW), .SW(SW)) u_bs (
      .d(pp[j]), .amt(AMT), .fill((j == NPP - 1) ? neg : 1'b0), .q(pp_al[j]));
  end

  for (genvar j = 0; j < OPW; j++) begin : g_rows
    assign pos_rows[j] = pp_al[j];
  end

  pp_adder_tree #(.N(OPW), .W(PW)) u_tree (.rows(pos_rows), .sum(tree_sum));

  prefix_adder #(.W(PW)) u_final (
    .x(tree_sum), .y(pp_al[NPP-1]), .cin(neg), .s(prod), .cout(prod_cout));

  result_reg #(.W(PW)) u_res (.clk(clk), .d(prod), .d_cout(prod_cout),
                              .q(c), .q_cout(cout));
endmodule
