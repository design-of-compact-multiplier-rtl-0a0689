// mac_accumulator: the (W+1)-bit accumulator register of the MAC.
// On every rising clock edge it stores the W-bit sum and carry produced by
// the MAC's adder: bits [W-1:0] take the new sum, and bit W is a sticky
// carry that is set when the adder carries out of bit W-1 and stays set
// until reset. The low W bits are fed back to the adder as the running sum;
// bit W records that the running sum has wrapped. A synchronous, active-high
// rst clears all W+1 bits. The register width W+1 = 129 for the 128-bit
// adder follows the MAC block diagram; the sticky top bit and the reset are
// this design's own choices.
module mac_accumulator #(
  parameter int unsigned W = 128
) (
  input  logic         clk,
  input  logic         rst,
  input  logic [W-1:0] sum,
  input  logic         carry,
  output logic [W:0]   acc
);
  always_ff @(posedge clk) begin
    if (rst) begin
      acc <= '0;
    end else begin
      acc <= {acc[W] | carry, sum};
    end
  end
endmodule
