// tb_cmult_top: end-to-end self-check of the complex multiplier at its
// default parameters.
//
// Phase 1 applies the operand sets of the original system simulation
// (for example a=1, b=6, c=1, d=3 gives q1 = 9, q2 = -17).
// Phase 2 streams all 65536 combinations of the four signed 4-bit operands,
// one per clock, with no gaps; a reset is asserted once in the middle.
// Every cycle the outputs are compared with ad + bc and ac - bd computed
// here from the operands sampled two edges earlier (wrapped to 8 bits),
// which checks the two-cycle latency and the one-result-per-clock rate.
// Mechanisms counted, each must occur at least once: back-to-back results,
// reset clearing the pipeline, negative results on both outputs, and the
// single 8-bit overflow, (-8)(-8) + (-8)(-8) = 128, which wraps to -128.
module tb_cmult_top;
  import cmult_pkg::*;

  logic     clk = 1'b0, reset_inv, vdd;
  operand_t a, b, c, d;
  result_t  q1, q2;

  int checks = 0, failures = 0;
  int n_back_to_back = 0, n_reset_flush = 0, n_neg_q1 = 0, n_neg_q2 = 0, n_overflow = 0;

  // Reference pipeline: expected outputs and whether they are valid.
  result_t exp_q1 [3];
  result_t exp_q2 [3];
  logic    exp_v  [3];

  cmult_top dut (
    .clk(clk), .reset_inv(reset_inv), .vdd(vdd),
    .a(a), .b(b), .c(c), .d(d), .q1(q1), .q2(q2)
  );

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (70000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Reference model, written independently of the gate structure.
  function automatic result_t ref_q1(operand_t ra, operand_t rb, operand_t rc, operand_t rd);
    int s = int'(ra) * int'(rd) + int'(rb) * int'(rc);
    return result_t'(s);
  endfunction

  function automatic result_t ref_q2(operand_t ra, operand_t rb, operand_t rc, operand_t rd);
    int s = int'(ra) * int'(rc) - int'(rb) * int'(rd);
    return result_t'(s);
  endfunction

  // Apply one set of operands for one clock and check what comes out.
  // exp_*[0] holds the expectation for the set being applied; after the
  // edge, q must equal the expectation of the set applied two cycles ago.
  int valid_run = 0;
  task automatic step(operand_t ta, operand_t tb, operand_t tc, operand_t td, logic rst_n);
    a = ta; b = tb; c = tc; d = td; reset_inv = rst_n;
    exp_q1[0] = ref_q1(ta, tb, tc, td);
    exp_q2[0] = ref_q2(ta, tb, tc, td);
    exp_v[0]  = rst_n;
    @(posedge clk); #1;
    for (int i = 2; i > 0; i--) begin
      exp_q1[i] = exp_q1[i-1];
      exp_q2[i] = exp_q2[i-1];
      exp_v[i]  = exp_v[i-1];
    end
    // A reset edge clears both register ranks.
    if (!rst_n) begin
      exp_q1[1] = '0; exp_q2[1] = '0; exp_v[1] = 1'b0;
      exp_q1[2] = '0; exp_q2[2] = '0; exp_v[2] = 1'b0;
    end
    checks++;
    if (q1 !== exp_q1[2] || q2 !== exp_q2[2]) begin
      failures++;
      if (failures < 10)
        $display("FAIL q1=%0d q2=%0d expected %0d %0d", q1, q2, exp_q1[2], exp_q2[2]);
    end
    if (!rst_n) begin
      if (q1 == '0 && q2 == '0) n_reset_flush++;
      valid_run = 0;
    end else if (exp_v[2]) begin
      valid_run++;
      if (valid_run >= 2) n_back_to_back++;
      if (q1 < 0) n_neg_q1++;
      if (q2 < 0) n_neg_q2++;
      if (exp_q1[2] == -128 && exp_q2[2] == 0) n_overflow++;
    end
  endtask

  // Operand sets of the original system simulation, with the results
  // worked out by hand.
  typedef struct {
    int a, b, c, d, q1, q2;
  } vec_t;
  vec_t paper_vecs [4] = '{
    '{a: 1, b: 6, c: 1, d: 3, q1:  9, q2: -17},
    '{a: 5, b: 4, c: 1, d: 2, q1: 14, q2:  -3},
    '{a: 1, b: 6, c: 5, d: 3, q1: 33, q2: -13},
    '{a: 5, b: 4, c: 5, d: 2, q1: 30, q2:  17}
  };

  initial begin
    vdd = 1'b1;
    for (int i = 0; i < 3; i++) begin
      exp_q1[i] = '0; exp_q2[i] = '0; exp_v[i] = 1'b0;
    end
    step('0, '0, '0, '0, 1'b0);
    step('0, '0, '0, '0, 1'b0);

    // Phase 1: hand-worked vectors, each held for three clocks.
    foreach (paper_vecs[k]) begin
      repeat (3) step(operand_t'(paper_vecs[k].a), operand_t'(paper_vecs[k].b),
                      operand_t'(paper_vecs[k].c), operand_t'(paper_vecs[k].d), 1'b1);
      checks++;
      if (int'(q1) != paper_vecs[k].q1 || int'(q2) != paper_vecs[k].q2) begin
        failures++;
        $display("FAIL vector %0d: q1=%0d q2=%0d", k, q1, q2);
      end
    end

    // Phase 2: every operand combination, one per clock.
    for (int v = 0; v < 65536; v++) begin
      logic [15:0] bits;
      bits = 16'(v);
      step(operand_t'(bits[15:12]), operand_t'(bits[11:8]),
           operand_t'(bits[7:4]),   operand_t'(bits[3:0]), (v != 30000));
    end
    step('0, '0, '0, '0, 1'b1);
    step('0, '0, '0, '0, 1'b1);

    checks += 5;
    if (n_back_to_back == 0) begin failures++; $display("FAIL no back-to-back results"); end
    if (n_reset_flush  == 0) begin failures++; $display("FAIL no reset flush"); end
    if (n_neg_q1       == 0) begin failures++; $display("FAIL no negative q1"); end
    if (n_neg_q2       == 0) begin failures++; $display("FAIL no negative q2"); end
    if (n_overflow     == 0) begin failures++; $display("FAIL overflow case not reached"); end
    $display("back_to_back=%0d reset_flush=%0d neg_q1=%0d neg_q2=%0d overflow=%0d",
             n_back_to_back, n_reset_flush, n_neg_q1, n_neg_q2, n_overflow);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
