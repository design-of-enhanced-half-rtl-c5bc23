// tb_column_wise_compression: random row-stage results through the column
// stage; LL, HL, LH and HH are compared with floor((x +/- y) / 2) computed in
// integer arithmetic, so both signs of the halving are exercised.
module tb_column_wise_compression;
  import dwt_pkg::*;
  row_pair_t r;
  subbands_t q;
  logic      clk = 1'b0;
  int        checks = 0, failures = 0;
  int        neg_seen = 0, odd_seen = 0;

  column_wise_compression dut (.r(r), .q(q));

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic int floor_half(input int v);
    return (v >= 0) ? v / 2 : -((-v + 1) / 2);
  endfunction

  task automatic check(input string what, input coef_t got, input int exp_v);
    checks++;
    if (int'(got) != exp_v) begin
      failures++;
      $display("FAIL %s: got %0d expected %0d", what, got, exp_v);
    end
  endtask

  initial begin
    int lo0, lo1, hi0, hi1;
    for (int n = 0; n < 5000; n++) begin
      lo0 = int'($urandom % 8192) - 4096;
      lo1 = int'($urandom % 8192) - 4096;
      hi0 = int'($urandom % 8192) - 4096;
      hi1 = int'($urandom % 8192) - 4096;
      r.lo0 = coef_t'(lo0); r.lo1 = coef_t'(lo1);
      r.hi0 = coef_t'(hi0); r.hi1 = coef_t'(hi1);
      @(posedge clk);
      if (lo0 - lo1 < 0 && ((lo0 - lo1) % 2) != 0) neg_seen++;
      if (((lo0 + lo1) % 2) != 0) odd_seen++;
      check("LL", q.ll, floor_half(lo0 + lo1));
      check("LH", q.lh, floor_half(lo0 - lo1));
      check("HL", q.hl, floor_half(hi0 + hi1));
      check("HH", q.hh, floor_half(hi0 - hi1));
    end
    checks++;
    if (neg_seen == 0 || odd_seen == 0) begin
      failures++;
      $display("FAIL: odd/negative halving never exercised");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
