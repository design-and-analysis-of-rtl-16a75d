// tb_vedic_mul2x2: exhaustive self-checking test of the 2x2 Vedic multiplier.
// Applies all 16 operand pairs and compares q with a * b computed here.
// A watchdog ends the run with a failure if it hangs.
module tb_vedic_mul2x2;
  logic [1:0] a, b;
  logic [3:0] q;
  int checks = 0, failures = 0;
  bit done = 0;

  vedic_mul2x2 dut (.a(a), .b(b), .q(q));

  initial begin
    for (int i = 0; i < 4; i++) begin
      for (int j = 0; j < 4; j++) begin
        a = 2'(i);
        b = 2'(j);
        #1;
        checks++;
        if (q != 4'(i * j)) begin
          failures++;
          $display("FAIL %0d * %0d -> %0d", i, j, q);
        end
      end
    end
    done = 1;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #10000;
    if (!done) begin
      failures++;
      $display("watchdog expired");
      $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
      $finish;
    end
  end
endmodule
