// carryadder: WIDTH-bit ripple-carry adder, z = a + b modulo 2^WIDTH.
// Bit 0 is a half adder (there is no carry in) and every higher bit a full
// adder taking the carry of the bit below, as in the original schematic.
// The carry out of the top bit is dropped: the output, like the inputs, is
// a WIDTH-bit two's-complement number and wraps on overflow.
// Interface: a, b -> z. Purely combinational; the carry ripples through
// WIDTH cells. WIDTH = 8 is the original size.
module carryadder #(
  parameter int unsigned WIDTH = 8
) (
  input  logic [WIDTH-1:0] a,
  input  logic [WIDTH-1:0] b,
  output logic [WIDTH-1:0] z
);
  logic [WIDTH-1:0] c;  // c[i] is the carry out of bit i

  halfadder u_bit0 (.a(a[0]), .b(b[0]), .s(z[0]), .co(c[0]));

  for (genvar i = 1; i < WIDTH; i++) begin : g_bit
    fulladder u_fa (
      .ain (a[i]),
      .bin (b[i]),
      .cin (c[i-1]),
      .sum (z[i]),
      .cout(c[i])
    );
  end

  // The carry out of the top bit is not brought out (the schematic has no
  // such pin); it is left unread on purpose.
  logic unused_carry;
  assign unused_carry = c[WIDTH-1];
endmodule
