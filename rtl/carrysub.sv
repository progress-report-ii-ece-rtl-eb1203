// carrysub: WIDTH-bit ripple-carry subtractor, z = a + ~b + cin modulo
// 2^WIDTH, which is a - b when cin = 1. Every bit of b passes an inverter
// into a full adder, and cin enters the full adder of bit 0, as in the
// original schematic, where cin is tied to the supply. The carry out of the
// top bit is dropped, so the difference wraps like the inputs.
// Interface: cin, a, b -> z. Purely combinational. WIDTH = 8 is the
// original size.
module carrysub #(
  parameter int unsigned WIDTH = 8
) (
  input  logic             cin,
  input  logic [WIDTH-1:0] a,
  input  logic [WIDTH-1:0] b,
  output logic [WIDTH-1:0] z
);
  logic [WIDTH-1:0] b_n;  // inverted subtrahend
  logic [WIDTH:0]   c;    // c[i] is the carry into bit i

  assign b_n  = ~b;
  assign c[0] = cin;

  for (genvar i = 0; i < WIDTH; i++) begin : g_bit
    fulladder u_fa (
      .ain (a[i]),
      .bin (b_n[i]),
      .cin (c[i]),
      .sum (z[i]),
      .cout(c[i+1])
    );
  end

  // The carry out of the top bit is not brought out; it is left unread.
  logic unused_carry;
  assign unused_carry = c[WIDTH];
endmodule
