// tb_full_adder: exhaustive check of the full adder against x + y + cin.
module tb_full_adder;
  logic x, y, cin, sum, carry;
  int checks = 0, failures = 0;

  full_adder dut (.x(x), .y(y), .cin(cin), .sum(sum), .carry(carry));

  initial begin : watchdog
    #10000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 8; i++) begin
      {x, y, cin} = 3'(i);
      #1;
      checks++;
      if ({carry, sum} != 2'(int'(x) + int'(y) + int'(cin))) begin
        failures++;
        $display("FAIL x=%0b y=%0b cin=%0b -> carry=%0b sum=%0b", x, y, cin, carry, sum);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
