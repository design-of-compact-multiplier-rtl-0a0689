// tb_vedic_mac_32: the 32-bit configuration of the MAC (32x32 multiplier,
// 64-bit adder, 65-bit accumulator), run on the two published 32-bit
// examples: 0x12345678 x 0x78945612 accumulated over ten clocks must give
// 0x55bed11b0507ec60, and 305419896 x 305419896 over ten clocks must give
// 932813128726508160. The running sum is also checked after every clock.
module tb_vedic_mac_32;
  localparam int N = 32;
  logic         clk = 1'b0;
  logic         rst;
  logic [N-1:0] a, b;
  logic [2*N:0] mac_out;
  int checks = 0, failures = 0;

  vedic_mac #(.N(N)) dut (.clk(clk), .rst(rst), .a(a), .b(b), .mac_out(mac_out));

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (1000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic run(input logic [N-1:0] va, input logic [N-1:0] vb, input logic [2*N:0] expected);
    logic [2*N:0] prod;
    prod = (2*N+1)'(va) * (2*N+1)'(vb);
    rst = 1'b1;
    @(posedge clk); #1;
    rst = 1'b0; a = va; b = vb;
    for (int k = 1; k <= 10; k++) begin
      @(posedge clk); #1;
      checks++;
      if (mac_out != prod * (2*N+1)'(k)) begin
        failures++;
        $display("FAIL clock %0d: mac_out=%h expected %h", k, mac_out, prod * (2*N+1)'(k));
      end
    end
    checks++;
    if (mac_out != expected) begin
      failures++;
      $display("FAIL %h x %h: mac_out=%h expected %h", va, vb, mac_out, expected);
    end else begin
      $display("%h x %h accumulated ten times = %h", va, vb, mac_out[2*N-1:0]);
    end
  endtask

  initial begin
    a = '0; b = '0;
    run(32'h1234_5678, 32'h7894_5612, 65'h0_55be_d11b_0507_ec60);
    run(32'd305419896, 32'd305419896, 65'd932813128726508160);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
