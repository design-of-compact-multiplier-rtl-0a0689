// tb_half_adder: exhaustive check of the half adder against x + y.
module tb_half_adder;
  logic x, y, sum, carry;
  int checks = 0, failures = 0;

  half_adder dut (.x(x), .y(y), .sum(sum), .carry(carry));

  initial begin : watchdog
    #10000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 4; i++) begin
      {x, y} = 2'(i);
      #1;
      checks++;
      if ({carry, sum} != 2'(int'(x) + int'(y))) begin
        failures++;
        $display("FAIL x=%0b y=%0b -> carry=%0b sum=%0b", x, y, carry, sum);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
