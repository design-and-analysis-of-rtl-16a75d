// tb_carry_save_adder: exhaustive self-checking test of the 6-bit carry-save
// adder at its default width.
// Applies all 2^18 operand triples and compares sum with (x + y + z) mod 64 and
// ovf with (x + y + z) > 63, both computed here. Counts how often stage 1
// produced a carry that stage 2 had to propagate further (a ripple carry),
// and fails if that never happened. A watchdog ends a hung run with a failure.
module tb_carry_save_adder;
  localparam int W = 6;
  logic [W-1:0] x, y, z, sum;
  logic         ovf;
  int checks = 0, failures = 0, ripples = 0;
  bit done = 0;

  carry_save_adder #(.W(W)) dut (.x(x), .y(y), .z(z), .sum(sum), .ovf(ovf));

  initial begin
    for (int i = 0; i < (1 << W); i++) begin
      for (int j = 0; j < (1 << W); j++) begin
        for (int k = 0; k < (1 << W); k++) begin
          int total;
          x = W'(i);
          y = W'(j);
          z = W'(k);
          total = i + j + k;
          #1;
          checks++;
          if (sum != W'(total) || ovf != (total >= (1 << W))) begin
            failures++;
            if (failures < 10)
              $display("FAIL %0d + %0d + %0d -> sum=%0d ovf=%0b", i, j, k, sum, ovf);
          end
          if (dut.rc != '0) ripples++;
        end
      end
    end
    checks++;
    if (ripples == 0) begin
      failures++;
      $display("FAIL no stage-2 ripple carry was ever produced");
    end
    done = 1;
    $display("ripple carries seen: %0d", ripples);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #10000000;
    if (!done) begin
      failures++;
      $display("watchdog expired");
      $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
      $finish;
    end
  end
endmodule
