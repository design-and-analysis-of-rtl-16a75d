// vedic_mul4x4_csa: 4x4-bit unsigned Vedic multiplier whose partial products
// are added by a single 6-bit carry-save adder.
// With a = {aH, aL} and b = {bH, bL} split into 2-bit halves, four 2x2 Vedic
// multipliers give Q0 = aL*bL, Q1 = aH*bL, Q2 = aL*bH and Q3 = aH*bH, so
// a*b = Q0 + 4*(Q1 + Q2) + 16*Q3.
//   p[1:0] = Q0[1:0], taken straight from the low partial product.
//   p[7:2] = {Q3, Q0[3:2]} + {00, Q1} + {00, Q2}, the three 6-bit inputs of
//            the carry-save adder (the first made by concatenation, the other
//            two by zero padding).
// Interface: a, b (4 bits), p = a * b (8 bits). Combinational, no clock.
// An immediate assertion checks that the adder never overflows its 6 bits,
// which holds for every 4x4 product.
// The split, the concatenation, the zero padding and the 6-bit adder follow
// the published design; the assignment of the two cross products to Q1 and Q2 is this
// implementation's choice (the sum does not depend on it).
module vedic_mul4x4_csa (
  input  logic [3:0] a,
  input  logic [3:0] b,
  output logic [7:0] p
);
  logic [3:0] q0, q1, q2, q3;
  logic       csa_ovf;

  vedic_mul2x2 u_m0 (.a(a[1:0]), .b(b[1:0]), .q(q0));
  vedic_mul2x2 u_m1 (.a(a[3:2]), .b(b[1:0]), .q(q1));
  vedic_mul2x2 u_m2 (.a(a[1:0]), .b(b[3:2]), .q(q2));
  vedic_mul2x2 u_m3 (.a(a[3:2]), .b(b[3:2]), .q(q3));

  assign p[1:0] = q0[1:0];

  carry_save_adder #(.W(6)) u_csa (
    .x  ({q3, q0[3:2]}),
    .y  ({2'b00, q1}),
    .z  ({2'b00, q2}),
    .sum(p[7:2]),
    .ovf(csa_ovf)
  );

  always_comb begin
    assert (csa_ovf == 1'b0) else $error("carry-save adder overflow");
  end
endmodule
