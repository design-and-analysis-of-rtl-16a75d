// vertical_adder: the 4-input vertical adder of the vertical-adder 4x4
// multiplier. It adds the middle of the partial-product array column by column.
// Column k (k = 0..3, product bit p[k+2]) adds four operands at once: its bit
// of the low/high partial product (Q0[3:2] for k = 0,1, Q3[1:0] for k = 2,3),
// its bits of Q1 and Q2, and the two-bit carry of column k-1, read as a
// number 0..3. The column total (at most 6) gives one sum bit, its LSB, and a
// two-bit carry, the rest, which goes to column k+1.
// Interface: q0_hi = Q0[3:2], q3_lo = Q3[1:0], q1 = Q1, q2 = Q2;
// s = p[5:2]; cout = the two-bit carry of the last column, worth cout * 2^6.
// Combinational.
// The operand grouping, the one-bit sum and the two-bit carry follow the
// published design; reading the carry as a binary number is this implementation's choice.
module vertical_adder (
  input  logic [1:0] q0_hi,
  input  logic [3:0] q1,
  input  logic [3:0] q2,
  input  logic [1:0] q3_lo,
  output logic [3:0] s,
  output logic [1:0] cout
);
  logic [3:0] d;        // the column bit of Q0[3:2] / Q3[1:0]
  logic [1:0] carry [5];  // carry[k] enters column k
  logic [2:0] total [4];

  assign d = {q3_lo, q0_hi};

  always_comb begin
    carry[0] = 2'd0;
    for (int k = 0; k < 4; k++) begin
      total[k]   = 3'(d[k]) + 3'(q1[k]) + 3'(q2[k]) + 3'(carry[k]);
      s[k]       = total[k][0];
      carry[k+1] = total[k][2:1];
    end
    cout = carry[4];
  end
endmodule
