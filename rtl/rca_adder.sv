// rca_adder: WIDTH-bit ripple-carry adder, sum = x + y + cin.
// One full adder per bit; the carry of bit i feeds the carry input of bit
// i+1 and the carry of the top bit is cout. Purely combinational; the delay
// grows linearly with WIDTH. The lower levels of the Vedic multiplier
// (4x4 up to 16x16) combine their partial products with these adders.
// The default width of 16 is the 16-bit adder of the 16x16 multiplier.
module rca_adder #(
  parameter int unsigned WIDTH = 16
) (
  input  logic [WIDTH-1:0] x,
  input  logic [WIDTH-1:0] y,
  input  logic             cin,
  output logic [WIDTH-1:0] sum,
  output logic             cout
);
  // Each bit keeps its carry in its own generate scope, so the chain is a
  // series of separate nets rather than one self-referencing vector.
  for (genvar i = 0; i < WIDTH; i++) begin : g_bit
    logic ci;
    logic co;
    if (i == 0) begin : g_first
      assign ci = cin;
    end else begin : g_next
      assign ci = g_bit[i-1].co;
    end
    full_adder u_fa (.x(x[i]), .y(y[i]), .cin(ci), .sum(sum[i]), .carry(co));
  end

  assign cout = g_bit[WIDTH-1].co;
endmodule
