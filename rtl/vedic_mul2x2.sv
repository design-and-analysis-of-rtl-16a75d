// vedic_mul2x2: 2x2-bit unsigned multiplier using the vertical-and-crosswise
// (Urdhva-Tiryagbhyam) method.
// Three steps, one per column of the product:
//   vertical    q[0] = a0 b0
//   crosswise   a1 b0 + a0 b1, added in a half adder: sum to q[1], carry on
//   vertical    a1 b1 + that carry, added in a second half adder: q[3:2]
// Interface: a, b (2 bits each), q = a * b (4 bits). Combinational, no clock.
// The four copies of this block produce the partial products Q0..Q3 of both
// 4x4 multipliers. The published design gives only the block's function; the two
// half-adder form is the crosswise method applied at two bits.
module vedic_mul2x2 (
  input  logic [1:0] a,
  input  logic [1:0] b,
  output logic [3:0] q
);
  logic cross_c;

  assign q[0] = a[0] & b[0];

  half_adder u_ha_cross (
    .x (a[1] & b[0]),
    .y (a[0] & b[1]),
    .s (q[1]),
    .co(cross_c)
  );

  half_adder u_ha_top (
    .x (a[1] & b[1]),
    .y (cross_c),
    .s (q[2]),
    .co(q[3])
  );
endmodule
