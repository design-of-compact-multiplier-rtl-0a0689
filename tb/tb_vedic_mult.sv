// tb_vedic_mult: checks the recursive Vedic multiplier against a * b.
// An 8x8 instance (all lower levels built of ripple-carry adders) is checked
// exhaustively over all 65536 operand pairs, starting with the worked
// example 10110110 x 11011001 = 1001101001000110. The full 64x64 instance
// (DKG adders at the 32x32 and 64x64 levels) is checked on corner operands
// and random operands, some with long runs of ones to push carries through
// every level.
module tb_vedic_mult;
  logic [7:0]   a8, b8;
  logic [15:0]  p8;
  logic [63:0]  a64, b64;
  logic [127:0] p64;
  int checks = 0, failures = 0;

  vedic_mult #(.N(8)) dut8  (.a(a8),  .b(b8),  .p(p8));
  vedic_mult          dut64 (.a(a64), .b(b64), .p(p64));

  initial begin : watchdog
    #10000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check64();
    logic [127:0] expected;
    #1;
    expected = 128'(a64) * 128'(b64);
    checks++;
    if (p64 != expected) begin
      failures++;
      $display("FAIL 64x64: %h * %h -> %h, expected %h", a64, b64, p64, expected);
    end
  endtask

  initial begin
    logic [63:0] corners [5] = '{'0, 1, '1, 64'h8000_0000_0000_0000, 64'hffff_ffff_0000_0001};
    int fails8;

    a8 = 8'b1011_0110; b8 = 8'b1101_1001;
    #1;
    checks++;
    if (p8 != 16'b1001_1010_0100_0110) begin
      failures++;
      $display("FAIL worked example: %b", p8);
    end

    fails8 = 0;
    for (int i = 0; i < 65536; i++) begin
      {a8, b8} = 16'(i);
      #1;
      checks++;
      if (p8 != 16'(int'(a8) * int'(b8))) begin
        failures++;
        fails8++;
        if (fails8 < 10) $display("FAIL 8x8: %0d * %0d -> %0d", a8, b8, p8);
      end
    end

    foreach (corners[i]) foreach (corners[j]) begin
      a64 = corners[i]; b64 = corners[j];
      check64();
    end
    repeat (3000) begin
      a64 = {$urandom, $urandom}; b64 = {$urandom, $urandom};
      // Some operands are mostly ones, which maximises the carries.
      if ($urandom_range(0, 3) == 0) a64 = ~(a64 & {$urandom, $urandom} & {$urandom, $urandom});
      if ($urandom_range(0, 3) == 0) b64 = ~(b64 & {$urandom, $urandom} & {$urandom, $urandom});
      check64();
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
