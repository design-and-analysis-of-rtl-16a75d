// tb_half_adder: exhaustive self-checking test of half_adder.
// Applies all four input pairs and compares {co, s} with x + y computed here.
// A watchdog ends the run with a failure if it has not finished in time.
module tb_half_adder;
  logic x, y, s, co;
  int checks = 0, failures = 0;
  bit done = 0;

  half_adder dut (.x(x), .y(y), .s(s), .co(co));

  initial begin
    for (int v = 0; v < 4; v++) begin
      {x, y} = 2'(v);
      #1;
      checks++;
      if ({co, s} != 2'(int'(x) + int'(y))) begin
        failures++;
        $display("FAIL x=%0b y=%0b -> co=%0b s=%0b", x, y, co, s);
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
