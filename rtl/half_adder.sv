// half_adder: one-bit half adder.
// Adds two bits: s is their XOR and co their AND, so {co, s} = x + y.
// It closes the partial-product chain of the 2x2 Vedic multiplier and forms
// the p6 column of the vertical-adder multiplier. Purely combinational.
// The published design names the cell; its gate form is the usual textbook one.
module half_adder (
  input  logic x,
  input  logic y,
  output logic s,
  output logic co
);
  always_comb begin
    s  = x ^ y;
    co = x & y;
  end
endmodule
