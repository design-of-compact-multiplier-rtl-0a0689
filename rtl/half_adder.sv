// half_adder: adds two bits.
// The sum is the XOR of the inputs and the carry is their AND, as in the
// classic two-gate half adder. Purely combinational, no clock.
// It is the basic cell of the 2x2 Vedic multiplier and, in pairs, of the
// full adder.
module half_adder (
  input  logic x,
  input  logic y,
  output logic sum,
  output logic carry
);
  assign sum   = x ^ y;
  assign carry = x & y;
endmodule
