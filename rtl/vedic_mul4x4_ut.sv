// vedic_mul4x4_ut: 4x4-bit unsigned multiplier computed directly with the
// vertical-and-crosswise (Urdhva-Tiryagbhyam) steps.
// Step k (k = 0..6) takes every bit product a_i * b_j with i + j = k: one
// vertical product in steps 0 and 6, crosswise pairs and triples in between,
// all four in step 3. It adds them to the carry left by step k-1; the LSB of
// the total is product bit p_k and the rest is the carry into step k+1. The
// carry left after step 6 is p_7. The largest column total is 6, so totals
// and carries are 3 bits wide.
// Interface: a, b (4 bits), p = a * b (8 bits). Combinational, no clock.
// The seven steps and the carry chaining follow the published design; writing each
// step's addition as one column count is this implementation's choice.
module vedic_mul4x4_ut (
  input  logic [3:0] a,
  input  logic [3:0] b,
  output logic [7:0] p
);
  logic [2:0] carry [8];   // carry[k] enters step k
  logic [2:0] total [7];

  always_comb begin
    carry[0] = 3'd0;
    for (int k = 0; k < 7; k++) begin
      total[k] = carry[k];
      for (int i = 0; i < 4; i++) begin
        if (k - i >= 0 && k - i < 4) begin
          total[k] = total[k] + 3'(a[i] & b[k-i]);
        end
      end
      p[k]       = total[k][0];
      carry[k+1] = {1'b0, total[k][2:1]};
    end
    p[7] = carry[7][0];
  end
endmodule
