// halfadder: one-bit half adder, one XOR2 for the sum and one AND2 for the
// carry, as in the original gate schematic.
// Interface: a, b -> s = a ^ b, co = a & b. Purely combinational.
module halfadder (
  input  logic a,
  input  logic b,
  output logic s,
  output logic co
);
  assign s  = a ^ b;
  assign co = a & b;
endmodule
