// tb_dkg_adder: checks the 64-bit DKG parallel adder against x + y + cin.
// The first vector is a published example: 0xef123fffff8dffff +
// 0xdffff13fffff32ff + 1 = 0xcf12313fff8d32ff with carry out 1. Then corner
// operands (a full carry ripple from bit 0 to bit 63) and random operands.
module tb_dkg_adder;
  localparam int W = 64;
  logic [W-1:0] x, y, sum;
  logic         cin, cout;
  int checks = 0, failures = 0;

  dkg_adder #(.WIDTH(W)) dut (.x(x), .y(y), .cin(cin), .sum(sum), .cout(cout));

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
    x = 64'hef12_3fff_ff8d_ffff; y = 64'hdfff_f13f_ffff_32ff; cin = 1'b1;
    #1;
    checks++;
    if (sum != 64'hcf12_313f_ff8d_32ff || cout != 1'b1) begin
      failures++;
      $display("FAIL example: sum=%h carry=%0b", sum, cout);
    end
    foreach (corners[i]) foreach (corners[j]) for (int c = 0; c < 2; c++) begin
      x = corners[i]; y = corners[j]; cin = c[0];
      check();
    end
    repeat (2000) begin
      x = {$urandom, $urandom}; y = {$urandom, $urandom}; cin = 1'($urandom);
      check();
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
