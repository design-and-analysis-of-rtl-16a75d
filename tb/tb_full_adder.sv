// tb_full_adder: exhaustive self-checking test of full_adder.
// Applies all eight input triples and compares {co, s} with x + y + ci
// computed here. A watchdog ends the run with a failure if it hangs.
module tb_full_adder;
  logic x, y, ci, s, co;
  int checks = 0, failures = 0;
  bit done = 0;

  full_adder dut (.x(x), .y(y), .ci(ci), .s(s), .co(co));

  initial begin
    for (int v = 0; v < 8; v++) begin
      {x, y, ci} = 3'(v);
      #1;
      checks++;
      if ({co, s} != 2'(int'(x) + int'(y) + int'(ci))) begin
        failures++;
        $display("FAIL x=%0b y=%0b ci=%0b -> co=%0b s=%0b", x, y, ci, co, s);
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
