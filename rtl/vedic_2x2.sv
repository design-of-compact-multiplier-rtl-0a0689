// vedic_2x2: 2x2-bit unsigned multiplier by the Urdhva Tiryagbhyam
// ("vertically and crosswise") rule, q = a * b.
// Step 1, vertical: q[0] = a[0] & b[0].
// Step 2, crosswise: the two cross products a[1]&b[0] and a[0]&b[1] are added
// by a half adder; its sum is q[1].
// Step 3, vertical: a[1]&b[1] is added to the carry of step 2 by a second
// half adder, giving q[2] and q[3].
// Four AND gates and two half adders, purely combinational. It is the leaf
// cell of the recursive Vedic multiplier.
module vedic_2x2 (
  input  logic [1:0] a,
  input  logic [1:0] b,
  output logic [3:0] q
);
  logic cross_c;

  assign q[0] = a[0] & b[0];

  half_adder u_ha_cross (
    .x(a[1] & b[0]), .y(a[0] & b[1]), .sum(q[1]), .carry(cross_c)
  );
  half_adder u_ha_top (
    .x(a[1] & b[1]), .y(cross_c), .sum(q[2]), .carry(q[3])
  );
endmodule
