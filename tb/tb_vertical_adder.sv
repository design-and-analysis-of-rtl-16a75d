// tb_vertical_adder: exhaustive self-checking test of the 4-input vertical
// adder.
// Applies every value of Q0[3:2], Q1, Q2 and Q3[1:0] (4096 cases). The
// operands weigh, in units of 2^2, Q0[3:2] + Q1 + Q2 + 4 * Q3[1:0]; that
// total, at most 45, must equal {cout, s}. Also counts columns whose two-bit
// carry reached 2 or more, and fails if that never happened.
// A watchdog ends a hung run with a failure.
module tb_vertical_adder;
  logic [1:0] q0_hi, q3_lo, cout;
  logic [3:0] q1, q2, s;
  int checks = 0, failures = 0, wide_carries = 0;
  bit done = 0;

  vertical_adder dut (
    .q0_hi(q0_hi), .q1(q1), .q2(q2), .q3_lo(q3_lo), .s(s), .cout(cout)
  );

  initial begin
    for (int v = 0; v < 4096; v++) begin
      int expect_total;
      {q3_lo, q2, q1, q0_hi} = 12'(v);
      expect_total = int'(q0_hi) + int'(q1) + int'(q2) + 4 * int'(q3_lo);
      #1;
      checks++;
      if ({cout, s} != 6'(expect_total)) begin
        failures++;
        if (failures < 10)
          $display("FAIL q0_hi=%0d q1=%0d q2=%0d q3_lo=%0d -> cout=%0d s=%0d",
                   q0_hi, q1, q2, q3_lo, cout, s);
      end
      for (int k = 1; k <= 4; k++)
        if (dut.carry[k] >= 2'd2) wide_carries++;
    end
    checks++;
    if (wide_carries == 0) begin
      failures++;
      $display("FAIL no column ever produced a carry of 2 or more");
    end
    done = 1;
    $display("two-bit carries seen: %0d", wide_carries);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #1000000;
    if (!done) begin
      failures++;
      $display("watchdog expired");
      $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
      $finish;
    end
  end
endmodule
