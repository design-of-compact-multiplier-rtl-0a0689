// tb_vedic_mac: end-to-end test of the 64-bit MAC at its default size.
//
// A reference model keeps the expected accumulator: each clock with rst low
// adds a * b (computed with the * operator) to the low 128 bits, and the top
// bit is set once that 128-bit sum wraps. After every clock mac_out must
// match the model. The run covers:
//   - the published example: a = 0x12345678, b = 0x78945612 held for ten
//     clocks, giving 0x55bed11b0507ec60;
//   - a = b = 305419896 held for ten clocks, giving 932813128726508160;
//   - random operands, some large, accumulated over many clocks;
//   - near-maximum operands, so the 128-bit sum wraps and sets the top bit;
//   - resets in the middle of a run.
// It counts how often each mechanism happened (accumulation, a carry between
// the two 64-bit halves of the adder, a wrap of the 128-bit sum, a reset)
// and fails if one of them never did.
module tb_vedic_mac;
  localparam int N = 64;
  logic           clk = 1'b0;
  logic           rst;
  logic [N-1:0]   a, b;
  logic [2*N:0]   mac_out;
  logic [2*N:0]   model;
  int checks = 0, failures = 0;
  int n_acc = 0, n_mid_carry = 0, n_wrap = 0, n_reset = 0;

  vedic_mac dut (.clk(clk), .rst(rst), .a(a), .b(b), .mac_out(mac_out));

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // One clock: update the model as the accumulator should, then compare.
  task automatic step();
    logic [2*N-1:0] prod;
    logic [N:0]     lo;
    logic [2*N:0]   full;
    prod = (2*N)'(a) * (2*N)'(b);
    @(posedge clk); #1;
    if (rst) begin
      model = '0;
      n_reset++;
    end else begin
      lo = {1'b0, prod[N-1:0]} + {1'b0, model[N-1:0]};
      if (lo[N]) n_mid_carry++;
      full = {1'b0, prod} + {1'b0, model[2*N-1:0]};
      if (full[2*N]) n_wrap++;
      model = {model[2*N] | full[2*N], full[2*N-1:0]};
      n_acc++;
    end
    checks++;
    if (mac_out != model) begin
      failures++;
      $display("FAIL a=%h b=%h rst=%0b: mac_out=%h expected %h", a, b, rst, mac_out, model);
    end
  endtask

  task automatic hold(input logic [N-1:0] va, input logic [N-1:0] vb, input int cycles,
                      input logic [2*N:0] expected);
    rst = 1'b1; step();
    rst = 1'b0; a = va; b = vb;
    repeat (cycles) step();
    checks++;
    if (mac_out != expected) begin
      failures++;
      $display("FAIL example %h x %h x %0d: mac_out=%h expected %h", va, vb, cycles, mac_out, expected);
    end
  endtask

  initial begin
    model = '0;
    rst = 1'b1; a = '0; b = '0;
    step();

    hold(64'h1234_5678, 64'h7894_5612, 10, (2*N+1)'(64'h55be_d11b_0507_ec60));
    hold(64'd305419896, 64'd305419896, 10, (2*N+1)'(64'd932813128726508160));

    rst = 1'b1; step();
    rst = 1'b0;
    for (int i = 0; i < 2000; i++) begin
      a = {$urandom, $urandom};
      b = {$urandom, $urandom};
      case ($urandom_range(0, 7))
        0: a = a >> $urandom_range(0, 63);
        1: b = b >> $urandom_range(0, 63);
        2: begin a = ~(a & {$urandom, $urandom}); b = ~(b & {$urandom, $urandom}); end
        default: ;
      endcase
      rst = (i % 700 == 699);
      step();
    end

    // Two near-maximum products in a row wrap the 128-bit sum.
    rst = 1'b1; step();
    rst = 1'b0; a = '1; b = '1;
    repeat (3) step();
    checks++;
    if (!mac_out[2*N]) begin
      failures++;
      $display("FAIL wrap flag not set after maximum products");
    end
    rst = 1'b1; step();
    rst = 1'b0;

    $display("mechanisms: accumulations=%0d mid_carries=%0d wraps=%0d resets=%0d",
             n_acc, n_mid_carry, n_wrap, n_reset);
    checks++;
    if (n_acc == 0 || n_mid_carry == 0 || n_wrap == 0 || n_reset == 0) begin
      failures++;
      $display("FAIL a mechanism never happened");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
