// multiplier: 4x4-bit two's-complement multiplier, z = x * y, by the
// Baugh-Wooley method.
//
// Sixteen partial products pp[i][j] = x[i] & y[j] have weight 2^(i+j). The
// six that pair one sign bit (index 3) with a non-sign bit carry negative
// weight; Baugh-Wooley replaces each by its complement (an AND2 becomes a
// NAND2) and adds the constant 2^4 + 2^7 to correct the sum. The 2^4 bit
// enters through the vdd pin as an adder input; the 2^7 bit is added by
// inverting the final carry, which is the only thing at weight 7.
//
// The partial products are summed by twelve one-bit adders in three rows
// of three full adders and one half adder, as in the original array:
//   row 1, weights 1..4: adds the first three partial-product bits of each
//                        column (the 2^4 constant in the weight-4 adder);
//   row 2, weights 2..5: adds row 1's sums and carries and the remaining
//                        partial products;
//   row 3, weights 3..6: a ripple-carry row that resolves the last carries.
// Gate count: 10 AND2, 6 NAND2, 9 full adders, 3 half adders, 1 inverter,
// which is the original's. Which bit enters which adder of a row is this
// design's own assignment, made by weight.
//
// Interface: vdd (must be 1), x, y -> z. Purely combinational. The range
// of z is -56..64, so the 8-bit product never overflows.
module multiplier (
  input  logic       vdd,
  input  logic [3:0] x,
  input  logic [3:0] y,
  output logic [7:0] z
);
  logic [3:0] pp [4];  // pp[i][j]: partial product of x[i] and y[j]

  always_comb begin
    for (int i = 0; i < 4; i++) begin
      for (int j = 0; j < 4; j++) begin
        if ((i == 3) != (j == 3)) pp[i][j] = ~(x[i] & y[j]);  // NAND2
        else                      pp[i][j] =   x[i] & y[j];   // AND2
      end
    end
  end

  // Row 1: s1_w / c1_w are the sum and carry of the adder at weight w.
  logic s1_2, s1_3, s1_4;
  logic c1_1, c1_2, c1_3, c1_4;
  halfadder u_r1_w1 (.a(pp[1][0]), .b(pp[0][1]), .s(z[1]), .co(c1_1));
  fulladder u_r1_w2 (.ain(pp[2][0]), .bin(pp[1][1]), .cin(pp[0][2]), .sum(s1_2), .cout(c1_2));
  fulladder u_r1_w3 (.ain(pp[3][0]), .bin(pp[2][1]), .cin(pp[1][2]), .sum(s1_3), .cout(c1_3));
  fulladder u_r1_w4 (.ain(pp[3][1]), .bin(pp[2][2]), .cin(vdd),      .sum(s1_4), .cout(c1_4));

  // Row 2.
  logic s2_3, s2_4, s2_5;
  logic c2_2, c2_3, c2_4, c2_5;
  halfadder u_r2_w2 (.a(s1_2), .b(c1_1), .s(z[2]), .co(c2_2));
  fulladder u_r2_w3 (.ain(s1_3),     .bin(c1_2),     .cin(pp[0][3]), .sum(s2_3), .cout(c2_3));
  fulladder u_r2_w4 (.ain(s1_4),     .bin(c1_3),     .cin(pp[1][3]), .sum(s2_4), .cout(c2_4));
  fulladder u_r2_w5 (.ain(pp[3][2]), .bin(pp[2][3]), .cin(c1_4),     .sum(s2_5), .cout(c2_5));

  // Row 3: ripple carry r_w out of weight w.
  logic r3, r4, r5, r6;
  halfadder u_r3_w3 (.a(s2_3), .b(c2_2), .s(z[3]), .co(r3));
  fulladder u_r3_w4 (.ain(s2_4),     .bin(c2_3), .cin(r3), .sum(z[4]), .cout(r4));
  fulladder u_r3_w5 (.ain(s2_5),     .bin(c2_4), .cin(r4), .sum(z[5]), .cout(r5));
  fulladder u_r3_w6 (.ain(pp[3][3]), .bin(c2_5), .cin(r5), .sum(z[6]), .cout(r6));

  assign z[0] = pp[0][0];
  assign z[7] = ~r6;  // adds the 2^7 correction constant
endmodule
