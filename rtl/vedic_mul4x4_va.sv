// vedic_mul4x4_va: 4x4-bit unsigned Vedic multiplier whose partial products
// are added by a 4-input vertical adder followed by a full/half adder stage.
// With a = {aH, aL} and b = {bH, bL}, four 2x2 Vedic multipliers give
// Q0 = aL*bL, Q1 = aH*bL, Q2 = aL*bH and Q3 = aH*bH.
//   p[1:0] = Q0[1:0], taken straight from the low partial product.
//   p[5:2]: the vertical adder adds Q0[3:2] to Q1[1:0] and Q2[1:0], then
//           Q3[1:0] to Q1[3:2] and Q2[3:2], column by column, each column
//           also taking the two-bit carry of the column below.
//   p[7:6]: a half adder and a full adder add Q3[3:2] to the vertical
//           adder's last two-bit carry.
// Interface: a, b (4 bits), p = a * b (8 bits). Combinational, no clock.
// An immediate assertion checks that no carry leaves bit 7, which holds for
// every 4x4 product.
// The data flow follows the published design; the assignment of the two cross products
// to Q1 and Q2 is this implementation's choice (the sum does not depend on it).
module vedic_mul4x4_va (
  input  logic [3:0] a,
  input  logic [3:0] b,
  output logic [7:0] p
);
  logic [3:0] q0, q1, q2, q3;
  logic [1:0] va_cout;
  logic       top_cout;

  vedic_mul2x2 u_m0 (.a(a[1:0]), .b(b[1:0]), .q(q0));
  vedic_mul2x2 u_m1 (.a(a[3:2]), .b(b[1:0]), .q(q1));
  vedic_mul2x2 u_m2 (.a(a[1:0]), .b(b[3:2]), .q(q2));
  vedic_mul2x2 u_m3 (.a(a[3:2]), .b(b[3:2]), .q(q3));

  assign p[1:0] = q0[1:0];

  vertical_adder u_va (
    .q0_hi(q0[3:2]),
    .q1   (q1),
    .q2   (q2),
    .q3_lo(q3[1:0]),
    .s    (p[5:2]),
    .cout (va_cout)
  );

  fa_ha_stage u_faha (
    .q3_hi(q3[3:2]),
    .cin  (va_cout),
    .p    (p[7:6]),
    .cout (top_cout)
  );

  always_comb begin
    assert (top_cout == 1'b0) else $error("carry out of product bit 7");
  end
endmodule
