// tb_ehrca4: exhaustive check of the 4-bit EHRCA: all 512 combinations of
// a, b and cin against integer addition.
module tb_ehrca4;
  logic [3:0] a, b, s;
  logic       cin, cout;
  logic       clk = 1'b0;
  int         checks = 0, failures = 0;

  ehrca4 dut (.a(a), .b(b), .cin(cin), .s(s), .cout(cout));

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (10000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int expect_sum;
    for (int i = 0; i < 512; i++) begin
      {cin, a, b} = 9'(i);
      @(posedge clk);
      expect_sum = int'(a) + int'(b) + int'(cin);
      checks++;
      if ({cout, s} != 5'(expect_sum)) begin
        failures++;
        $display("FAIL %0d + %0d + %0d -> %0d", a, b, cin, {cout, s});
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
