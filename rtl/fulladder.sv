// fulladder: one-bit full adder made of two XOR2, two AND2 and one OR2, the
// gate set of the original schematic. The first XOR forms the propagate
// term p = bin ^ cin; sum = ain ^ p; the carry is (bin & cin) | (ain & p).
// Which AND gate takes which pair follows the common two-half-adder form.
// Interface: ain, bin, cin -> sum, cout. Purely combinational.
module fulladder (
  input  logic ain,
  input  logic bin,
  input  logic cin,
  output logic sum,
  output logic cout
);
  logic p;

  assign p    = bin ^ cin;
  assign sum  = ain ^ p;
  assign cout = (bin & cin) | (ain & p);
endmodule
