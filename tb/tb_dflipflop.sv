// tb_dflipflop: self-check of the D flip-flop. Random data is clocked in
// and q is compared one edge later with a reference bit kept by the
// testbench; reset is pulsed at random and must clear q on the next edge
// only (synchronous reset).
module tb_dflipflop;
  logic clk = 1'b0, reset_inv, d, q;
  logic expect_q;
  int checks = 0, failures = 0;

  dflipflop dut (.clk(clk), .reset_inv(reset_inv), .d(d), .q(q));

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (2000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    reset_inv = 1'b0;
    d         = 1'b1;
    @(posedge clk); #1;
    checks++;
    if (q !== 1'b0) begin failures++; $display("FAIL reset"); end
    expect_q = 1'b0;
    for (int n = 0; n < 500; n++) begin
      reset_inv = ($urandom_range(0, 9) != 0);
      d         = 1'($urandom);
      // An asynchronous reset would clear q here, before the edge.
      #1;
      checks++;
      if (q !== expect_q) begin failures++; $display("FAIL before edge n=%0d", n); end
      @(posedge clk); #1;
      expect_q = reset_inv ? d : 1'b0;
      checks++;
      if (q !== expect_q) begin
        failures++;
        $display("FAIL n=%0d d=%0b rst_n=%0b q=%0b", n, d, reset_inv, q);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
