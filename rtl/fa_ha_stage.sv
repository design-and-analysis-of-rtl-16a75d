// fa_ha_stage: the "full adder and half adder" stage of the vertical-adder
// 4x4 multiplier. It adds Q3[3:2] to the two-bit carry left by the vertical
// adder and gives the top two product bits.
// Column 6: a half adder adds Q3[2] and carry bit 0 (weight 2^6) -> p6.
// Column 7: a full adder adds Q3[3], carry bit 1 (weight 2^7) and the half
// adder's carry -> p7; its own carry is cout, which is always 0 for a 4x4
// product and is brought out so that a user can check this.
// Interface: q3_hi = Q3[3:2], cin = vertical-adder carry, p = {p7, p6}.
// Combinational. The published design names the stage and its two cells; which column
// holds which cell is this implementation's choice.
module fa_ha_stage (
  input  logic [1:0] q3_hi,
  input  logic [1:0] cin,
  output logic [1:0] p,
  output logic       cout
);
  logic ha_c;

  half_adder u_ha (
    .x (q3_hi[0]),
    .y (cin[0]),
    .s (p[0]),
    .co(ha_c)
  );

  full_adder u_fa (
    .x (q3_hi[1]),
    .y (cin[1]),
    .ci(ha_c),
    .s (p[1]),
    .co(cout)
  );
endmodule
