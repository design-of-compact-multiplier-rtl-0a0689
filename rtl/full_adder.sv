// full_adder: adds three bits (x, y and a carry in).
// Built as two half adders and an OR gate: the first half adder adds x and y,
// the second adds its sum to cin, and the OR of the two half-adder carries is
// the carry out. Purely combinational. Used by the ripple-carry adders of the
// lower multiplier levels.
module full_adder (
  input  logic x,
  input  logic y,
  input  logic cin,
  output logic sum,
  output logic carry
);
  logic s1, c1, c2;

  half_adder u_ha1 (.x(x),  .y(y),   .sum(s1),  .carry(c1));
  half_adder u_ha2 (.x(s1), .y(cin), .sum(sum), .carry(c2));

  assign carry = c1 | c2;
endmodule
