// cmult_pkg: widths and value types shared by the complex multiplier.
// The operands are 4-bit two's-complement numbers and every product, sum
// and difference is carried as an 8-bit two's-complement number, the widths
// of the original schematic. Nothing here is a design choice beyond naming.
package cmult_pkg;
  localparam int unsigned IN_W  = 4;            // width of A, B, C, D
  localparam int unsigned OUT_W = 2 * IN_W;     // width of products and results

  typedef logic signed [IN_W-1:0]  operand_t;   // one real or imaginary part
  typedef logic signed [OUT_W-1:0] result_t;    // product, sum or difference
endpackage
