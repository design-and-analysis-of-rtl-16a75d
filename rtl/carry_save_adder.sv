// carry_save_adder: adds three W-bit operands in two stages.
// Stage 1 adds every bit column on its own, with no carry passed sideways:
// W full adders give a sum vector s and a carry vector c, c[i] weighing 2^(i+1).
// Stage 2 adds the carry vector, shifted up one place, to the sum vector with
// a ripple of full adders and gives the final W-bit sum.
// Interface: x, y, z (W bits each), sum = (x + y + z) mod 2^W, and ovf, set
// when the true total does not fit in W bits (a carry leaves bit W-1 in either
// stage). Combinational. In the 4x4 multiplier the result is the upper six
// product bits, which always fit, so ovf stays 0 there.
// The two-stage scheme and W = 6 follow the published design; the ripple form of
// stage 2 is this implementation's choice.
module carry_save_adder #(
  parameter int W = 6
) (
  input  logic [W-1:0] x,
  input  logic [W-1:0] y,
  input  logic [W-1:0] z,
  output logic [W-1:0] sum,
  output logic         ovf
);
  // Stage 1: sum and carry vectors, no carry propagation.
  logic [W-1:0] s1;
  logic [W-1:0] c1;
  // Stage 2 ripple carries; rc[i] enters bit i. c1[W-1] and rc[W] fall
  // outside the W-bit result and only raise ovf.
  logic [W:1]   rc;

  for (genvar i = 0; i < W; i++) begin : g_stage1
    full_adder u_fa (
      .x (x[i]),
      .y (y[i]),
      .ci(z[i]),
      .s (s1[i]),
      .co(c1[i])
    );
  end

  assign sum[0] = s1[0];
  assign rc[1]  = 1'b0;

  for (genvar i = 1; i < W; i++) begin : g_stage2
    full_adder u_fa (
      .x (s1[i]),
      .y (c1[i-1]),
      .ci(rc[i]),
      .s (sum[i]),
      .co(rc[i+1])
    );
  end

  assign ovf = c1[W-1] | rc[W];
endmodule
