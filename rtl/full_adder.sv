// full_adder: one-bit full adder.
// Adds three bits: s is the parity of the three inputs and co is their
// majority, so {co, s} = x + y + ci. It is the cell the carry-save adder uses
// in both of its stages, and the p7 column of the vertical-adder multiplier.
// Purely combinational. The published design names the cell; its gate form is the usual
// textbook one.
module full_adder (
  input  logic x,
  input  logic y,
  input  logic ci,
  output logic s,
  output logic co
);
  always_comb begin
    s  = x ^ y ^ ci;
    co = (x & y) | (x & ci) | (y & ci);
  end
endmodule
