// tb_rca_adder: checks the 16-bit ripple-carry adder against x + y + cin,
// exhaustively over the corner operands and then on random operands.
module tb_rca_adder;
  localparam int W = 16;
  logic [W-1:0] x, y, sum;
  logic         cin, cout;
  int checks = 0, failures = 0;

  rca_adder #(.WIDTH(W)) dut (.x(x), .y(y), .cin(cin), .sum(sum), .cout(cout));

  initial begin : watchdog
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check();
    logic [W:0] expected;
    #1;
    expected = {1'b0, x} + {1'b0, y} + (W+1)'(cin);
    checks++;
    if ({cout, sum} != expected) begin
      failures++;
      $display("FAIL %h + %h + %0b -> %0b %h, expected %h", x, y, cin, cout, sum, expected);
    end
  endtask

  initial begin
    logic [W-1:0] corners [4] = '{'0, 1, {W{1'b1}}, {1'b1, {(W-1){1'b0}}}};
    foreach (corners[i]) foreach (corners[j]) for (int c = 0; c < 2; c++) begin
      x = corners[i]; y = corners[j]; cin = c[0];
      check();
    end
    repeat (2000) begin
      x = W'($urandom); y = W'($urandom); cin = 1'($urandom);
      check();
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
