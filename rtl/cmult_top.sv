// cmult_top: pipelined multiplier of two complex numbers with 4-bit signed
// parts, (a + jb)(c + jd) = (ac - bd) + j(ad + bc).
//
// Structure, as in the original top-level schematic:
//   - four input registers (fifo, 8 bits each) capture the operand pairs
//     {a,d}, {b,c}, {a,c}, {b,d} on the rising clock edge;
//   - four Baugh-Wooley multipliers form ad, bc, ac and bd in parallel;
//   - a ripple-carry adder forms ad + bc and a ripple-carry subtractor
//     (carry-in tied to vdd) forms ac - bd;
//   - two output registers (fifo, 8 bits each) drive q1 and q2.
// Every product has its own input register and its own multiplier; the
// operand fan-out to the four lanes is the original wiring.
//
// Interface: clk; reset_inv, active-low synchronous reset of all 48
// flip-flops; vdd, the logic-1 tie of the schematic, must be held at 1;
// a, b, c, d: signed 4-bit operands; q1 = ad + bc and q2 = ac - bd as
// signed 8-bit numbers. By the formula above q2 is the real part and q1 the
// imaginary part. Only (-8)(-8) + (-8)(-8) = 128 overflows 8 bits; it wraps
// to -128, as the ripple adder does.
// Timing: one result per clock; q1/q2 show the result of the operands
// sampled two rising edges earlier.
module cmult_top
  import cmult_pkg::*;
(
  input  logic     clk,
  input  logic     reset_inv,
  input  logic     vdd,
  input  operand_t a,
  input  operand_t b,
  input  operand_t c,
  input  operand_t d,
  output result_t  q1,
  output result_t  q2
);
  // Input registers: the x operand of each multiplier in the upper half,
  // the y operand in the lower half.
  operand_t mx [4];
  operand_t my [4];
  operand_t op_x [4];
  operand_t op_y [4];
  result_t  prod [4];

  // Product k: 0 = a*d, 1 = b*c, 2 = c*a, 3 = d*b.
  assign op_x = '{a, b, c, d};
  assign op_y = '{d, c, a, b};

  for (genvar k = 0; k < 4; k++) begin : g_lane
    fifo #(.WIDTH(2 * IN_W)) u_in_reg (
      .clk       (clk),
      .reset_inv (reset_inv),
      .d         ({op_x[k], op_y[k]}),
      .q         ({mx[k], my[k]})
    );

    multiplier u_mult (
      .vdd (vdd),
      .x   (mx[k]),
      .y   (my[k]),
      .z   (prod[k])
    );
  end

  result_t sum_ad_bc;
  result_t diff_ac_bd;

  carryadder #(.WIDTH(OUT_W)) u_sum (
    .a (prod[0]),
    .b (prod[1]),
    .z (sum_ad_bc)
  );

  carrysub #(.WIDTH(OUT_W)) u_diff (
    .cin (vdd),
    .a   (prod[2]),
    .b   (prod[3]),
    .z   (diff_ac_bd)
  );

  fifo #(.WIDTH(OUT_W)) u_out_reg1 (
    .clk       (clk),
    .reset_inv (reset_inv),
    .d         (sum_ad_bc),
    .q         (q1)
  );

  fifo #(.WIDTH(OUT_W)) u_out_reg2 (
    .clk       (clk),
    .reset_inv (reset_inv),
    .d         (diff_ac_bd),
    .q         (q2)
  );

  // vdd supplies the constant-one bits of the arithmetic; any other value
  // gives wrong products and differences.
  a_vdd_tied_high: assert property (@(posedge clk) vdd)
    else $error("cmult_top: vdd must be held at 1");
endmodule
