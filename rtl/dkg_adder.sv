// dkg_adder: WIDTH-bit parallel adder made of reversible DKG gates,
// sum = x + y + cin.
// Bit i is one DKG gate with A = 0, B = x[i], C = y[i] and D = the carry
// from bit i-1 (cin for bit 0). With A tied low the gate is a full adder:
// its S output is the sum bit and its R output the carry passed on to the
// next gate; the P and Q outputs are garbage and are left unused. The carry
// ripples from bit 0 to bit WIDTH-1 and leaves as cout. Purely
// combinational. The default width of 64 is the 64-bit adder of the
// 64x64 multiplier and of each half of the MAC's 128-bit adder.
module dkg_adder #(
  parameter int unsigned WIDTH = 64
) (
  input  logic [WIDTH-1:0] x,
  input  logic [WIDTH-1:0] y,
  input  logic             cin,
  output logic [WIDTH-1:0] sum,
  output logic             cout
);
  for (genvar i = 0; i < WIDTH; i++) begin : g_bit
    logic ci;
    logic co;
    logic garbage_p;
    logic garbage_q;
    if (i == 0) begin : g_first
      assign ci = cin;
    end else begin : g_next
      assign ci = g_bit[i-1].co;
    end
    dkg_gate u_dkg (
      .a(1'b0), .b(x[i]), .c(y[i]), .d(ci),
      .p(garbage_p), .q(garbage_q), .r(co), .s(sum[i])
    );
  end

  assign cout = g_bit[WIDTH-1].co;
endmodule
