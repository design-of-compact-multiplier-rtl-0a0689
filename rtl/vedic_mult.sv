// vedic_mult: N x N unsigned multiplier, p = a * b, built recursively in the
// Urdhva Tiryagbhyam ("vertically and crosswise") style.
//
// Each operand is split into a high and a low half of H = N/2 bits. Four
// H x H multipliers form the vertical and crosswise products
//   q0 = a_lo * b_lo   (vertical, low)
//   q1 = a_lo * b_hi   (crosswise)
//   q2 = a_hi * b_lo   (crosswise)
//   q3 = a_hi * b_hi   (vertical, high)
// and three N-bit adders combine them:
//   adder 1: s1 = q1 + q2, carry ca1
//   adder 2: s2 = s1 + {H zeros, q0[N-1:H]}, carry ca2
//   adder 3: p[2N-1:N] = q3 + {H-1 zeros, ca1 | ca2, s2[N-1:H]}
// with p[H-1:0] = q0[H-1:0] and p[N-1:H] = s2[H-1:0]. ca1 and ca2 are never
// both set, so their OR is the carry of weight 2^N into adder 3. The
// recursion ends at the 2x2 multiplier cell. N must be a power of two, 2 or
// more.
//
// Levels whose N is at least DKG_FROM combine their products with reversible
// DKG adders, the lower levels with ripple-carry adders of full adders
// (the 16x16 level uses ripple-carry adders, the 32x32 and 64x64 levels DKG
// adders). Feeding ca2 into adder 3 alongside ca1 is this design's own
// addition: without it a carry out of adder 2 would be lost. The 4x4 and 8x8
// levels follow the same scheme as the larger ones.
//
// Purely combinational, no clock; the result is valid one combinational
// delay after a and b change.
//
// Lint note: when this self-instantiating module is linted on its own as the
// top, Verilator reports q0..q3 as undriven and a, b as unused in an extra,
// unelaborated copy of the module it keeps for the recursion. Every
// elaborated instance drives them (the module simulates correctly at N = 8
// and N = 64, and the warning does not appear when it is linted under
// vedic_mac), so the warning stands.
module vedic_mult #(
  parameter int unsigned N        = 64,
  parameter int unsigned DKG_FROM = 32
) (
  input  logic [N-1:0]   a,
  input  logic [N-1:0]   b,
  output logic [2*N-1:0] p
);
  if (N < 2 || (N & (N - 1)) != 0) begin : g_bad_width
    $error("vedic_mult: N must be a power of two and at least 2");
  end

  if (N == 2) begin : g_leaf
    vedic_2x2 u_cell (.a(a), .b(b), .q(p));
  end else begin : g_split
    localparam int unsigned H = N / 2;

    logic [N-1:0] q0, q1, q2, q3;
    logic [N-1:0] s1, s2;
    logic         ca1, ca2, ca3;
    logic [N-1:0] add2_y, add3_y;

    vedic_mult #(.N(H), .DKG_FROM(DKG_FROM)) u_ll (.a(a[H-1:0]), .b(b[H-1:0]), .p(q0));
    vedic_mult #(.N(H), .DKG_FROM(DKG_FROM)) u_lh (.a(a[H-1:0]), .b(b[N-1:H]), .p(q1));
    vedic_mult #(.N(H), .DKG_FROM(DKG_FROM)) u_hl (.a(a[N-1:H]), .b(b[H-1:0]), .p(q2));
    vedic_mult #(.N(H), .DKG_FROM(DKG_FROM)) u_hh (.a(a[N-1:H]), .b(b[N-1:H]), .p(q3));

    assign add2_y = {{H{1'b0}}, q0[N-1:H]};
    assign add3_y = {{(H-1){1'b0}}, ca1 | ca2, s2[N-1:H]};

    if (N >= DKG_FROM) begin : g_dkg
      dkg_adder #(.WIDTH(N)) u_add1 (.x(q1), .y(q2),     .cin(1'b0), .sum(s1),          .cout(ca1));
      dkg_adder #(.WIDTH(N)) u_add2 (.x(s1), .y(add2_y), .cin(1'b0), .sum(s2),          .cout(ca2));
      dkg_adder #(.WIDTH(N)) u_add3 (.x(q3), .y(add3_y), .cin(1'b0), .sum(p[2*N-1:N]), .cout(ca3));
    end else begin : g_rca
      rca_adder #(.WIDTH(N)) u_add1 (.x(q1), .y(q2),     .cin(1'b0), .sum(s1),          .cout(ca1));
      rca_adder #(.WIDTH(N)) u_add2 (.x(s1), .y(add2_y), .cin(1'b0), .sum(s2),          .cout(ca2));
      rca_adder #(.WIDTH(N)) u_add3 (.x(q3), .y(add3_y), .cin(1'b0), .sum(p[2*N-1:N]), .cout(ca3));
    end

    assign p[H-1:0] = q0[H-1:0];
    assign p[N-1:H] = s2[H-1:0];

    // The two carries into adder 3 exclude each other, and the product
    // never overflows 2N bits.
    always_comb begin
      assert final (!(ca1 && ca2)) else $error("vedic_mult: ca1 and ca2 both set");
      assert final (!ca3) else $error("vedic_mult: carry out of adder 3");
    end
  end
endmodule
