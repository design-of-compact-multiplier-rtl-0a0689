// dkg_gate: the 4-input, 4-output reversible DKG gate.
//   P = B
//   Q = (~A & C) | (A & ~D)
//   R = ((A ^ B) & (C ^ D)) ^ (C & D)
//   S = B ^ C ^ D
// With A = 0 the gate is a full adder of B, C and D: S is the sum and R the
// carry, while P and Q are garbage outputs that pass B and C through. With
// A = 1, S is the difference B - C - D and R the borrow, so the gate is a full
// subtractor. Each output is a fixed Boolean function of the inputs and the
// mapping is one-to-one. Purely combinational.
module dkg_gate (
  input  logic a,
  input  logic b,
  input  logic c,
  input  logic d,
  output logic p,
  output logic q,
  output logic r,
  output logic s
);
  assign p = b;
  assign q = (~a & c) | (a & ~d);
  assign r = ((a ^ b) & (c ^ d)) ^ (c & d);
  assign s = b ^ c ^ d;
endmodule
