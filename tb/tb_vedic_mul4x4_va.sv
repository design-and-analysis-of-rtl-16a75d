// tb_vedic_mul4x4_va: exhaustive self-checking test of vedic_mul4x4_va.
// Applies all 256 pairs of 4-bit unsigned operands and compares the product
// with a * b computed here, then checks a few hand-worked products
// (15 * 15 = 225, 13 * 11 = 143, 0 * 9 = 0). A watchdog ends a hung run
// with a failure.
module tb_vedic_mul4x4_va;
  logic [3:0] a, b;
  logic [7:0] p;
  int checks = 0, failures = 0;
  bit done = 0;

  vedic_mul4x4_va dut (.a(a), .b(b), .p(p));

  task automatic check(input int x, input int y, input int expected);
    a = 4'(x);
    b = 4'(y);
    #1;
    checks++;
    if (p != 8'(expected)) begin
      failures++;
      $display("FAIL %0d * %0d -> %0d, expected %0d", x, y, p, expected);
    end
  endtask

  initial begin
    for (int i = 0; i < 16; i++)
      for (int j = 0; j < 16; j++)
        check(i, j, i * j);
    check(15, 15, 225);
    check(13, 11, 143);
    check(0, 9, 0);
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
