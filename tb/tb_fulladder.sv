// tb_fulladder: exhaustive self-check of the full adder. All eight input
// combinations are applied and {cout, sum} is compared with ain + bin + cin.
module tb_fulladder;
  logic ain, bin, cin, sum, cout;
  int checks = 0, failures = 0;

  fulladder dut (.ain(ain), .bin(bin), .cin(cin), .sum(sum), .cout(cout));

  initial begin : watchdog
    #10000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 8; v++) begin
      {ain, bin, cin} = 3'(v);
      #1;
      checks++;
      if ({cout, sum} != 2'(int'(ain) + int'(bin) + int'(cin))) begin
        failures++;
        $display("FAIL %0b%0b%0b -> cout=%0b sum=%0b", ain, bin, cin, cout, sum);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
