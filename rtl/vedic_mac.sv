// vedic_mac: N-bit multiply-accumulate unit, the top of the design.
//
// Datapath, one stage per clock:
//   product  = a * b                       N x N Vedic multiplier, 2N bits
//   {c, s}   = product + mac_out[2N-1:0]   2N-bit reversible adder
//   mac_out <= {mac_out[2N] | c, s}        (2N+1)-bit accumulator
// With the default N = 64 this is a 64x64 multiplier, a 128-bit adder and a
// 129-bit accumulator. The 2N-bit adder is two N-bit DKG adders in series:
// the low one adds the low halves, its carry enters the high one.
//
// Interface: a and b are sampled on every rising edge of clk and their
// product is added to the accumulator; mac_out shows the running sum one
// clock after the operands were applied. rst (synchronous, active high)
// clears the accumulator; the first product is accumulated on the first
// clock edge with rst low. mac_out[2N] is a sticky flag set once the 2N-bit
// running sum has wrapped. The multiplier, the adder and the accumulator
// sizes follow the block diagram of the MAC; the reset, the accumulation on
// every clock and the sticky top bit are this design's own choices.
module vedic_mac #(
  parameter int unsigned N = 64
) (
  input  logic         clk,
  input  logic         rst,
  input  logic [N-1:0] a,
  input  logic [N-1:0] b,
  output logic [2*N:0] mac_out
);
  logic [2*N-1:0] product;
  logic [2*N-1:0] sum;
  logic           carry_mid;
  logic           carry_out;

  vedic_mult #(.N(N)) u_mult (.a(a), .b(b), .p(product));

  dkg_adder #(.WIDTH(N)) u_add_lo (
    .x(product[N-1:0]), .y(mac_out[N-1:0]), .cin(1'b0),
    .sum(sum[N-1:0]), .cout(carry_mid)
  );
  dkg_adder #(.WIDTH(N)) u_add_hi (
    .x(product[2*N-1:N]), .y(mac_out[2*N-1:N]), .cin(carry_mid),
    .sum(sum[2*N-1:N]), .cout(carry_out)
  );

  mac_accumulator #(.W(2*N)) u_acc (
    .clk(clk), .rst(rst), .sum(sum), .carry(carry_out), .acc(mac_out)
  );
endmodule
