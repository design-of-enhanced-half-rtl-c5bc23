// tb_dwt_core: streams random 2x2 blocks, with random idle clocks, into the
// pipelined DWT core and checks that each block's LL/HL/LH/HH appear exactly
// two clocks after it was accepted, in order, with the Haar values
//   LL = floor((a+b+c+d)/2), HL = floor((a-b+c-d)/2),
//   LH = floor((a+b-c-d)/2), HH = floor((a-b-c+d)/2)
// for block [a b; c d]. Also checks that no result appears without input.
module tb_dwt_core;
  import dwt_pkg::*;
  logic      clk = 1'b0, rst_n = 1'b0;
  logic      in_valid = 1'b0;
  block_t    px;
  logic      out_valid;
  subbands_t q;
  int        checks = 0, failures = 0;
  int        cycle = 0;

  dwt_core dut (.clk(clk), .rst_n(rst_n), .in_valid(in_valid), .px(px),
                .out_valid(out_valid), .q(q));

  always #5 clk = ~clk;
  always @(posedge clk) cycle <= cycle + 1;

  initial begin : watchdog
    repeat (50000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic int floor_half(input int v);
    return (v >= 0) ? v / 2 : -((-v + 1) / 2);
  endfunction

  typedef struct { int ll, hl, lh, hh, due; } exp_t;
  exp_t expq [$];
  int   sent = 0, got = 0;

  // Scoreboard: sample outputs just after each edge.
  always @(posedge clk) begin
    #1;
    if (rst_n && out_valid) begin
      exp_t e;
      checks++;
      if (expq.size() == 0) begin
        failures++;
        $display("FAIL: result without input at cycle %0d", cycle);
      end else begin
        e = expq.pop_front();
        got++;
        if (cycle != e.due) begin
          failures++;
          $display("FAIL latency: result at %0d expected %0d", cycle, e.due);
        end
        if (int'(q.ll) != e.ll || int'(q.hl) != e.hl || int'(q.lh) != e.lh || int'(q.hh) != e.hh) begin
          failures++;
          $display("FAIL value: got %0d %0d %0d %0d expected %0d %0d %0d %0d",
                   q.ll, q.hl, q.lh, q.hh, e.ll, e.hl, e.lh, e.hh);
        end
      end
    end
  end

  initial begin
    int a, b, c, d;
    repeat (3) @(posedge clk);
    rst_n <= 1'b1;
    for (int n = 0; n < 4000; n++) begin
      @(negedge clk);
      if ($urandom % 4 != 0) begin
        exp_t e;
        if (n % 2 == 0) begin
          a = int'($urandom % 256); b = int'($urandom % 256);
          c = int'($urandom % 256); d = int'($urandom % 256);
        end else begin
          a = int'($urandom % 2048) - 1024; b = int'($urandom % 2048) - 1024;
          c = int'($urandom % 2048) - 1024; d = int'($urandom % 2048) - 1024;
        end
        in_valid = 1'b1;
        px.p00 = coef_t'(a); px.p01 = coef_t'(b); px.p10 = coef_t'(c); px.p11 = coef_t'(d);
        e.ll = floor_half(a + b + c + d);
        e.hl = floor_half(a - b + c - d);
        e.lh = floor_half(a + b - c - d);
        e.hh = floor_half(a - b - c + d);
        e.due = cycle + 2;   // accepted at the coming edge, out two edges later
        expq.push_back(e);
        sent++;
      end else begin
        in_valid = 1'b0;
        px = block_t'($urandom);
      end
    end
    @(negedge clk) in_valid = 1'b0;
    repeat (5) @(posedge clk);
    #2;
    checks++;
    if (got != sent || expq.size() != 0) begin
      failures++;
      $display("FAIL: sent %0d blocks, received %0d", sent, got);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
