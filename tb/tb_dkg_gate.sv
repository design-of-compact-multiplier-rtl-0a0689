// tb_dkg_gate: exhaustive check of the DKG gate.
// With a = 0 the pair {r, s} must equal b + c + d (full adder); with a = 1,
// s must be the difference bit and r the borrow of b - c - d (full
// subtractor). p must copy b, q must follow its defining expression, and all
// 16 input patterns must give 16 different output patterns (reversibility).
module tb_dkg_gate;
  logic a, b, c, d, p, q, r, s;
  int checks = 0, failures = 0;
  bit [15:0] seen;

  dkg_gate dut (.a(a), .b(b), .c(c), .d(d), .p(p), .q(q), .r(r), .s(s));

  initial begin : watchdog
    #10000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int diff;
    seen = '0;
    for (int i = 0; i < 16; i++) begin
      {a, b, c, d} = 4'(i);
      #1;
      if (!a) begin
        checks++;
        if ({r, s} != 2'(int'(b) + int'(c) + int'(d))) begin
          failures++;
          $display("FAIL adder b=%0b c=%0b d=%0b -> r=%0b s=%0b", b, c, d, r, s);
        end
      end else begin
        diff = int'(b) - int'(c) - int'(d);
        checks++;
        if (s != diff[0] || r != (diff < 0)) begin
          failures++;
          $display("FAIL subtractor b=%0b c=%0b d=%0b -> r=%0b s=%0b", b, c, d, r, s);
        end
      end
      checks++;
      if (p != b || q != (a ? ~d : c)) begin
        failures++;
        $display("FAIL garbage outputs a=%0b b=%0b c=%0b d=%0b -> p=%0b q=%0b", a, b, c, d, p, q);
      end
      seen[{p, q, r, s}] = 1'b1;
    end
    checks++;
    if (seen != 16'hffff) begin
      failures++;
      $display("FAIL gate is not reversible: outputs seen %h", seen);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
