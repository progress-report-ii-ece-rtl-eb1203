// tb_carryadder: exhaustive self-check of the 8-bit ripple-carry adder.
// All 65536 operand pairs are applied and z is compared with (a + b) mod
// 256, then a few signed cases worked out by hand (13 + -29 = -16,
// 64 + 16 = 80, -14 + -24 = -38) are checked as signed numbers.
module tb_carryadder;
  localparam int unsigned W = 8;
  logic [W-1:0] a, b, z;
  int checks = 0, failures = 0;

  carryadder dut (.a(a), .b(b), .z(z));

  initial begin : watchdog
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check_signed(int sa, int sb, int sz);
    a = W'(sa);
    b = W'(sb);
    #1;
    checks++;
    if (int'($signed(z)) != sz) begin
      failures++;
      $display("FAIL %0d + %0d = %0d, expected %0d", sa, sb, $signed(z), sz);
    end
  endtask

  initial begin
    for (int va = 0; va < 256; va++) begin
      for (int vb = 0; vb < 256; vb++) begin
        a = W'(va);
        b = W'(vb);
        #1;
        checks++;
        if (z != W'(va + vb)) begin
          failures++;
          if (failures < 10) $display("FAIL %0d + %0d -> %0d", va, vb, z);
        end
      end
    end
    check_signed(13, -29, -16);
    check_signed(64, 16, 80);
    check_signed(-14, -24, -38);
    check_signed(127, 1, -128);   // wraps
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
