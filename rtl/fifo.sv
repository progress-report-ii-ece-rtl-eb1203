// fifo: one-word buffer register built from WIDTH D flip-flops.
// The design calls this block a FIFO, but it holds a single word: each
// rising clock edge copies d to q, so it is a one-stage pipeline register
// with no pointers or full/empty flags. The system uses six of them: four
// on the input side, each holding a pair of 4-bit operands, and two on the
// output side, each holding one 8-bit result. WIDTH = 8 is the original
// size ("8 D flip-flops"); using one module for both sides is this
// design's choice.
// Interface: clk, reset_inv (active-low, synchronous), d -> q.
// Timing: one cycle of latency, a new word every cycle.
module fifo #(
  parameter int unsigned WIDTH = 8
) (
  input  logic             clk,
  input  logic             reset_inv,
  input  logic [WIDTH-1:0] d,
  output logic [WIDTH-1:0] q
);
  for (genvar i = 0; i < WIDTH; i++) begin : g_bit
    dflipflop u_dff (
      .clk       (clk),
      .reset_inv (reset_inv),
      .d         (d[i]),
      .q         (q[i])
    );
  end
endmodule
