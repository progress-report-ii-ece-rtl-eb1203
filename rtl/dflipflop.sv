// dflipflop: one-bit D flip-flop, the storage cell of the FIFO register.
// On every rising clock edge q takes d, or 0 while reset_inv is low; the
// reset is synchronous, as in the original cell description, which samples
// its reset only on the clock edge. The original cell also has an inverted
// clock pin for its transmission-gate latches; it carries no information of
// its own and is not a port here.
// Interface: clk, reset_inv (active low), d -> q. Timing: q changes one
// clock edge after d is sampled.
module dflipflop (
  input  logic clk,
  input  logic reset_inv,
  input  logic d,
  output logic q
);
  always_ff @(posedge clk) begin
    if (!reset_inv) q <= 1'b0;
    else            q <= d;
  end
endmodule
