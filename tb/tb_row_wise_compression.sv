// tb_row_wise_compression: random 2x2 blocks (unsigned pixels and signed
// intermediate LL values) through the row stage; sums and differences of
// each row are compared with integer arithmetic.
module tb_row_wise_compression;
  import dwt_pkg::*;
  block_t    px;
  row_pair_t r;
  logic      clk = 1'b0;
  int        checks = 0, failures = 0;

  row_wise_compression dut (.px(px), .r(r));

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic int rnd(input int span, input bit sgn);
    int v;
    v = int'($urandom % span);
    return sgn ? v - span / 2 : v;
  endfunction

  task automatic check(input string what, input coef_t got, input int exp_v);
    checks++;
    if (int'(got) != exp_v) begin
      failures++;
      $display("FAIL %s: got %0d expected %0d", what, got, exp_v);
    end
  endtask

  initial begin
    int p [4];
    for (int n = 0; n < 5000; n++) begin
      bit sgn;
      sgn = (n % 2 == 1);
      for (int k = 0; k < 4; k++) p[k] = rnd(sgn ? 4096 : 256, sgn);
      px.p00 = coef_t'(p[0]); px.p01 = coef_t'(p[1]);
      px.p10 = coef_t'(p[2]); px.p11 = coef_t'(p[3]);
      @(posedge clk);
      check("lo0", r.lo0, p[0] + p[1]);
      check("lo1", r.lo1, p[2] + p[3]);
      check("hi0", r.hi0, p[0] - p[1]);
      check("hi1", r.hi1, p[2] - p[3]);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
