// tb_vedic_mul4x4_top: end-to-end test of the three 4x4 multipliers at their
// only size.
// Applies all 256 pairs of 4-bit unsigned operands and checks each of the
// three products against a * b computed here. It also watches the inner
// mechanisms and fails if one of them never came into play:
//   - carry-save adder, stage 1 produced a carry vector
//   - carry-save adder, stage 2 had to ripple a carry
//   - vertical adder, a column carry of 2 or more (both carry bits in use)
//   - vertical adder, a carry passed on into the full/half adder stage
//   - full/half adder stage, the half adder carried into the full adder
//   - crosswise steps, a step carry of 2 or more
// A watchdog ends a hung run with a failure.
module tb_vedic_mul4x4_top;
  logic [3:0] a, b;
  logic [7:0] p_csa, p_va, p_ut;
  int checks = 0, failures = 0;
  int n_csa_carry = 0, n_csa_ripple = 0, n_va_wide = 0, n_va_out = 0;
  int n_ha_carry = 0, n_ut_wide = 0;
  bit done = 0;

  vedic_mul4x4_top dut (.a(a), .b(b), .p_csa(p_csa), .p_va(p_va), .p_ut(p_ut));

  task automatic expect_mech(input string what, input int count);
    checks++;
    $display("%s: %0d", what, count);
    if (count == 0) begin
      failures++;
      $display("FAIL mechanism never exercised: %s", what);
    end
  endtask

  initial begin
    for (int i = 0; i < 16; i++) begin
      for (int j = 0; j < 16; j++) begin
        a = 4'(i);
        b = 4'(j);
        #1;
        checks += 3;
        if (p_csa != 8'(i * j)) begin
          failures++;
          $display("FAIL csa %0d * %0d -> %0d", i, j, p_csa);
        end
        if (p_va != 8'(i * j)) begin
          failures++;
          $display("FAIL va %0d * %0d -> %0d", i, j, p_va);
        end
        if (p_ut != 8'(i * j)) begin
          failures++;
          $display("FAIL ut %0d * %0d -> %0d", i, j, p_ut);
        end
        if (dut.u_csa.u_csa.c1 != '0) n_csa_carry++;
        if (dut.u_csa.u_csa.rc != '0) n_csa_ripple++;
        for (int k = 1; k <= 4; k++)
          if (dut.u_va.u_va.carry[k] >= 2'd2) n_va_wide++;
        if (dut.u_va.va_cout != '0) n_va_out++;
        if (dut.u_va.u_faha.ha_c) n_ha_carry++;
        for (int k = 1; k <= 7; k++)
          if (dut.u_ut.carry[k] >= 3'd2) n_ut_wide++;
      end
    end
    expect_mech("carry-save stage-1 carries", n_csa_carry);
    expect_mech("carry-save stage-2 ripples", n_csa_ripple);
    expect_mech("vertical adder two-bit carries", n_va_wide);
    expect_mech("vertical adder carries into p7:p6", n_va_out);
    expect_mech("half adder carries into the full adder", n_ha_carry);
    expect_mech("crosswise step carries of 2 or more", n_ut_wide);
    done = 1;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100000;
    if (!done) begin
      failures++;
      $display("watchdog expired");
      $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
      $finish;
    end
  end
endmodule
