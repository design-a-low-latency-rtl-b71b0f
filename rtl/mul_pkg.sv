// mul_pkg: widths shared by the signed multiplier.
// The operands are 32 bits wide and the product 64 bits (the port widths of
// the multiplier top). XW is the operand width after sign preprocessing: one
// extra bit makes signed and unsigned operands alike into 33-bit two's
// complement numbers. NPP is the number of partial products, one per bit of
// the extended multiplier.
// The 32-bit operands and 64-bit product follow the published port list; the
// one-bit extension is this design's own way of covering both number kinds.
package mul_pkg;
  localparam int unsigned OPW = 32;        // operand width
  localparam int unsigned PW  = 2 * OPW;   // product width
  localparam int unsigned XW  = OPW + 1;   // sign-extended operand width
  localparam int unsigned NPP = XW;        // partial products
endpackage
