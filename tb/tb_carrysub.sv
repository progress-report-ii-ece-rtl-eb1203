// tb_carrysub: exhaustive self-check of the 8-bit ripple-carry subtractor.
// All 65536 operand pairs are applied with cin = 1 (z must be a - b mod
// 256) and with cin = 0 (z must be a - b - 1 mod 256). Signed cases worked
// out by hand (31 - -7 = 38, -19 - 21 = -40, -3 - -11 = 8) follow.
module tb_carrysub;
  localparam int unsigned W = 8;
  logic         cin;
  logic [W-1:0] a, b, z;
  int checks = 0, failures = 0;

  carrysub dut (.cin(cin), .a(a), .b(b), .z(z));

  initial begin : watchdog
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check_signed(int sa, int sb, int sz);
    cin = 1'b1;
    a   = W'(sa);
    b   = W'(sb);
    #1;
    checks++;
    if (int'($signed(z)) != sz) begin
      failures++;
      $display("FAIL %0d - %0d = %0d, expected %0d", sa, sb, $signed(z), sz);
    end
  endtask

  initial begin
    for (int vc = 0; vc < 2; vc++) begin
      for (int va = 0; va < 256; va++) begin
        for (int vb = 0; vb < 256; vb++) begin
          cin = 1'(vc);
          a   = W'(va);
          b   = W'(vb);
          #1;
          checks++;
          if (z != W'(va - vb - 1 + vc)) begin
            failures++;
            if (failures < 10) $display("FAIL cin=%0d %0d - %0d -> %0d", vc, va, vb, z);
          end
        end
      end
    end
    check_signed(31, -7, 38);
    check_signed(-19, 21, -40);
    check_signed(-3, -11, 8);
    check_signed(-128, 1, 127);   // wraps
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
