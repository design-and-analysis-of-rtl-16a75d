// tb_fa_ha_stage: exhaustive self-checking test of the full/half adder stage.
// Applies all 16 values of Q3[3:2] and the two-bit carry and compares
// {cout, p} with their sum computed here. A watchdog ends a hung run with a
// failure.
module tb_fa_ha_stage;
  logic [1:0] q3_hi, cin, p;
  logic       cout;
  int checks = 0, failures = 0;
  bit done = 0;

  fa_ha_stage dut (.q3_hi(q3_hi), .cin(cin), .p(p), .cout(cout));

  initial begin
    for (int v = 0; v < 16; v++) begin
      {q3_hi, cin} = 4'(v);
      #1;
      checks++;
      if ({cout, p} != 3'(int'(q3_hi) + int'(cin))) begin
        failures++;
        $display("FAIL q3_hi=%0d cin=%0d -> cout=%0b p=%0d", q3_hi, cin, cout, p);
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
