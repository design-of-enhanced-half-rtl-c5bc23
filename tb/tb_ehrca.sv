// tb_ehrca: checks the 16-bit EHRCA (default width) with corner cases and
// random operands, and an 8-bit instance exhaustively, against integer
// addition. Also checks subtraction in the form a + ~b + 1.
module tb_ehrca;
  logic [15:0] a16, b16, s16;
  logic        cin16, cout16;
  logic [7:0]  a8, b8, s8;
  logic        cin8, cout8;
  logic        clk = 1'b0;
  int          checks = 0, failures = 0;

  ehrca dut16 (.a(a16), .b(b16), .cin(cin16), .s(s16), .cout(cout16));
  ehrca #(.WIDTH(8)) dut8 (.a(a8), .b(b8), .cin(cin8), .s(s8), .cout(cout8));

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (300000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check16(input logic [15:0] x, input logic [15:0] y, input logic c);
    logic [16:0] ref_sum;
    a16 = x; b16 = y; cin16 = c;
    @(posedge clk);
    ref_sum = 17'(x) + 17'(y) + 17'(c);
    checks++;
    if ({cout16, s16} != ref_sum) begin
      failures++;
      $display("FAIL16 %h + %h + %0d -> %h (expected %h)", x, y, c, {cout16, s16}, ref_sum);
    end
  endtask

  initial begin
    // carry runs the full length
    check16(16'hFFFF, 16'h0000, 1'b1);
    check16(16'hFFFF, 16'hFFFF, 1'b1);
    check16(16'h8000, 16'h8000, 1'b0);
    check16(16'h7FFF, 16'h0001, 1'b0);
    check16(16'h0F0F, 16'hF0F0, 1'b1);
    for (int i = 0; i < 20000; i++)
      check16(16'($urandom), 16'($urandom), 1'($urandom));

    // subtraction as used by the DWT filters
    for (int i = 0; i < 2000; i++) begin
      logic signed [15:0] x, y;
      x = 16'($signed(12'($urandom)));
      y = 16'($signed(12'($urandom)));
      a16 = x; b16 = ~y; cin16 = 1'b1;
      @(posedge clk);
      checks++;
      if ($signed(s16) != x - y) begin
        failures++;
        $display("FAILSUB %0d - %0d -> %0d", x, y, $signed(s16));
      end
    end

    // 8-bit instance, all operand pairs and carries
    for (int i = 0; i < 131072; i++) begin
      {cin8, a8, b8} = 17'(i);
      @(posedge clk);
      checks++;
      if ({cout8, s8} != 9'(int'(a8) + int'(b8) + int'(cin8))) begin
        failures++;
        if (failures < 10) $display("FAIL8 %0d + %0d + %0d -> %0d", a8, b8, cin8, {cout8, s8});
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
