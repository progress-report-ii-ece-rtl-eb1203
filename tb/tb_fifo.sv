// tb_fifo: self-check of the one-word buffer register at its default width.
// Every one of the 256 words is presented once, then random words follow,
// one per cycle; q must show each word exactly one
// rising edge later, and a reset cycle must clear all bits.
module tb_fifo;
  localparam int unsigned W = 8;
  logic         clk = 1'b0, reset_inv;
  logic [W-1:0] d, q, expect_q;
  int checks = 0, failures = 0, resets = 0;

  fifo dut (.clk(clk), .reset_inv(reset_inv), .d(d), .q(q));

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    reset_inv = 1'b0;
    d         = '1;
    @(posedge clk); #1;
    checks++;
    if (q !== '0) begin failures++; $display("FAIL reset q=%h", q); end
    for (int n = 0; n < 2000; n++) begin
      reset_inv = (n < 256) || ($urandom_range(0, 19) != 0);
      d         = (n < 256) ? W'(n) : W'($urandom);
      expect_q  = reset_inv ? d : '0;
      if (!reset_inv) resets++;
      @(posedge clk); #1;
      checks++;
      if (q !== expect_q) begin
        failures++;
        $display("FAIL n=%0d d=%h q=%h expected %h", n, d, q, expect_q);
      end
    end
    checks++;
    if (resets == 0) begin failures++; $display("FAIL no reset exercised"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
