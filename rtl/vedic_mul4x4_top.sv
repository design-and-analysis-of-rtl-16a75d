// vedic_mul4x4_top: the three 4x4 Vedic multipliers side by side.
// Both operands feed, unchanged, the carry-save-adder architecture
// (vedic_mul4x4_csa), the vertical-adder architecture (vedic_mul4x4_va) and
// the direct seven-step crosswise method (vedic_mul4x4_ut). Each brings out its
// own 8-bit product, so the three can be compared or any one used alone; all
// three equal a * b for unsigned a and b.
// Interface: a, b (4 bits); p_csa, p_va, p_ut (8 bits). Combinational, no
// clock: each product settles one propagation delay after the operands change.
// Putting the three on shared operands is this implementation's choice; the
// published design presents them as alternative realisations of the same multiplier.
module vedic_mul4x4_top (
  input  logic [3:0] a,
  input  logic [3:0] b,
  output logic [7:0] p_csa,
  output logic [7:0] p_va,
  output logic [7:0] p_ut
);
  vedic_mul4x4_csa u_csa (.a(a), .b(b), .p(p_csa));
  vedic_mul4x4_va  u_va  (.a(a), .b(b), .p(p_va));
  vedic_mul4x4_ut  u_ut  (.a(a), .b(b), .p(p_ut));
endmodule
