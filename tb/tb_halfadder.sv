// tb_halfadder: exhaustive self-check of the half adder. All four input
// pairs are applied and {co, s} is compared with the arithmetic sum a + b.
module tb_halfadder;
  logic a, b, s, co;
  int checks = 0, failures = 0;

  halfadder dut (.a(a), .b(b), .s(s), .co(co));

  initial begin : watchdog
    #10000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 4; v++) begin
      {a, b} = 2'(v);
      #1;
      checks++;
      if ({co, s} != 2'(int'(a) + int'(b))) begin
        failures++;
        $display("FAIL a=%0b b=%0b -> co=%0b s=%0b", a, b, co, s);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
