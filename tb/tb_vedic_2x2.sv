// tb_vedic_2x2: exhaustive check of the 2x2 Vedic multiplier against a * b.
module tb_vedic_2x2;
  logic [1:0] a, b;
  logic [3:0] q;
  int checks = 0, failures = 0;

  vedic_2x2 dut (.a(a), .b(b), .q(q));

  initial begin : watchdog
    #10000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 16; i++) begin
      {a, b} = 4'(i);
      #1;
      checks++;
      if (q != 4'(int'(a) * int'(b))) begin
        failures++;
        $display("FAIL %0d * %0d -> %0d", a, b, q);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
