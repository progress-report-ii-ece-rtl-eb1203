// tb_multiplier: exhaustive self-check of the 4x4 signed multiplier. All
// 256 operand pairs are applied and z is compared, as a signed 8-bit
// number, with the product of the two signed 4-bit operands. The extreme
// cases (-8)(-8) = 64, (-8)(7) = -56 and the hand-worked (-3)(-5) = 15,
// (-3)(3) = -9 are counted to show they were reached.
module tb_multiplier;
  logic       vdd;
  logic [3:0] x, y;
  logic [7:0] z;
  int checks = 0, failures = 0, corners = 0;

  multiplier dut (.vdd(vdd), .x(x), .y(y), .z(z));

  initial begin : watchdog
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    vdd = 1'b1;
    for (int sx = -8; sx < 8; sx++) begin
      for (int sy = -8; sy < 8; sy++) begin
        int expect_z;
        x = 4'(sx);
        y = 4'(sy);
        #1;
        expect_z = sx * sy;
        checks++;
        if (int'($signed(z)) != expect_z) begin
          failures++;
          $display("FAIL %0d * %0d = %0d, expected %0d", sx, sy, $signed(z), expect_z);
        end
        if ((sx == -8 && sy == -8) || (sx == -8 && sy == 7) ||
            (sx == -3 && sy == -5) || (sx == -3 && sy == 3)) corners++;
      end
    end
    checks++;
    if (corners != 4) begin failures++; $display("FAIL corner cases missed"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
