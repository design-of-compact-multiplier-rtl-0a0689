// tb_mac_accumulator: checks the 129-bit accumulator register: reset clears
// it, each clock loads the 128-bit sum, and the top bit is set by a carry and
// then holds until reset.
module tb_mac_accumulator;
  localparam int W = 128;
  logic         clk = 1'b0;
  logic         rst;
  logic [W-1:0] sum;
  logic         carry;
  logic [W:0]   acc;
  logic [W:0]   model;
  int checks = 0, failures = 0, carries = 0;

  mac_accumulator #(.W(W)) dut (.clk(clk), .rst(rst), .sum(sum), .carry(carry), .acc(acc));

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    rst = 1'b1; sum = '1; carry = 1'b1;
    @(posedge clk); #1;
    model = '0;
    checks++;
    if (acc != model) begin
      failures++;
      $display("FAIL reset: acc=%h", acc);
    end
    rst = 1'b0;
    for (int cycle = 0; cycle < 1000; cycle++) begin
      sum = {$urandom, $urandom, $urandom, $urandom};
      carry = ($urandom_range(0, 99) == 0);
      if (cycle == 500) rst = 1'b1;
      else rst = 1'b0;
      @(posedge clk); #1;
      if (rst) model = '0;
      else begin
        if (carry) carries++;
        model = {model[W] | carry, sum};
      end
      checks++;
      if (acc != model) begin
        failures++;
        $display("FAIL cycle %0d: acc=%h expected %h", cycle, acc, model);
      end
    end
    checks++;
    if (carries == 0) begin
      failures++;
      $display("FAIL no carry was ever applied");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
