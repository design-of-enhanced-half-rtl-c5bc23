// tb_dwt2d_top: end-to-end test of the three-level 2-D DWT at its default
// size (256 x 256 pixels, three levels, no parameter overrides).
//
// Two images are decomposed back to back: a smooth gradient with noise and
// an image of random pixels. For each, the testbench loads the pixels,
// pulses start, and checks every streamed coefficient against a reference
// Haar pyramid computed here in integer arithmetic
//   LL = floor((a+b+c+d)/2), HL = floor((a-b+c-d)/2),
//   LH = floor((a+b-c-d)/2), HH = floor((a-b-c+d)/2)
// for each 2x2 block [a b; c d], the next level working on the LL band.
// It also checks the block count of every level, the clock count from start
// to done (one block per clock plus three drain clocks per level), that the
// final single-image layout (LL3 and all detail bands) is covered exactly
// once, and counts how often each mechanism occurred: level-1 blocks read
// from the image buffer, level-2/3 blocks read back from the LL buffer,
// negative detail coefficients, odd sums rounded by the halving, pipeline
// drains between levels, a start ignored while busy, and completed runs.
module tb_dwt2d_top;
  import dwt_pkg::*;

  localparam int IMG = 256, LEVELS = 3, LG = 8, LVW = 2;

  logic            clk = 1'b0, rst_n = 1'b0;
  logic            pix_we = 1'b0;
  logic [LG-1:0]   pix_row = '0, pix_col = '0;
  logic [7:0]      pix_data = '0;
  logic            start = 1'b0;
  logic            busy, done, coef_valid;
  logic [LVW-1:0]  coef_level;
  logic [LG-2:0]   coef_row, coef_col;
  subbands_t       coef;

  int checks = 0, failures = 0;

  dwt2d_top dut (
    .clk(clk), .rst_n(rst_n), .pix_we(pix_we), .pix_row(pix_row),
    .pix_col(pix_col), .pix_data(pix_data), .start(start), .busy(busy),
    .done(done), .coef_valid(coef_valid), .coef_level(coef_level),
    .coef_row(coef_row), .coef_col(coef_col), .coef(coef));

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (400000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ---------------------------------------------------------- reference
  int img    [IMG][IMG];
  int cur    [IMG][IMG];        // LL band being decomposed
  int e_ll   [LEVELS+1][IMG/2][IMG/2];
  int e_hl   [LEVELS+1][IMG/2][IMG/2];
  int e_lh   [LEVELS+1][IMG/2][IMG/2];
  int e_hh   [LEVELS+1][IMG/2][IMG/2];
  int layout_hits [IMG][IMG];

  function automatic int floor_half(input int v);
    return (v >= 0) ? v / 2 : -((-v + 1) / 2);
  endfunction

  task automatic build_reference();
    for (int r = 0; r < IMG; r++)
      for (int c = 0; c < IMG; c++) cur[r][c] = img[r][c];
    for (int l = 1; l <= LEVELS; l++) begin
      int side;
      side = IMG >> l;
      for (int i = 0; i < side; i++)
        for (int j = 0; j < side; j++) begin
          int a, b, c, d;
          a = cur[2*i][2*j];   b = cur[2*i][2*j+1];
          c = cur[2*i+1][2*j]; d = cur[2*i+1][2*j+1];
          e_ll[l][i][j] = floor_half(a + b + c + d);
          e_hl[l][i][j] = floor_half(a - b + c - d);
          e_lh[l][i][j] = floor_half(a + b - c - d);
          e_hh[l][i][j] = floor_half(a - b - c + d);
        end
      for (int i = 0; i < side; i++)
        for (int j = 0; j < side; j++) cur[i][j] = e_ll[l][i][j];
    end
  endtask

  // ------------------------------------------------------- mechanisms
  int n_img_blocks = 0, n_llbuf_blocks = 0, n_neg_detail = 0, n_odd_round = 0;
  int n_drain = 0, n_ignored_start = 0, n_runs = 0;
  int blocks_at [LEVELS+1];

  // ------------------------------------------------------- monitor
  always @(posedge clk) begin
    #1;
    if (rst_n && coef_valid) begin
      int l, i, j, s;
      l = int'(coef_level); i = int'(coef_row); j = int'(coef_col);
      checks++;
      if (l < 1 || l > LEVELS || i >= (IMG >> l) || j >= (IMG >> l)) begin
        failures++;
        $display("FAIL: bad coefficient position L%0d (%0d,%0d)", l, i, j);
      end else begin
        blocks_at[l]++;
        if (l == 1) n_img_blocks++; else n_llbuf_blocks++;
        if (coef.hl < 0 || coef.lh < 0 || coef.hh < 0) n_neg_detail++;
        if (int'(coef.ll) != e_ll[l][i][j] || int'(coef.hl) != e_hl[l][i][j] ||
            int'(coef.lh) != e_lh[l][i][j] || int'(coef.hh) != e_hh[l][i][j]) begin
          failures++;
          if (failures < 10)
            $display("FAIL L%0d (%0d,%0d): got %0d %0d %0d %0d expected %0d %0d %0d %0d",
                     l, i, j, coef.ll, coef.hl, coef.lh, coef.hh,
                     e_ll[l][i][j], e_hl[l][i][j], e_lh[l][i][j], e_hh[l][i][j]);
        end
        // single-image layout
        s = IMG >> l;
        layout_hits[i][j + s]++;
        layout_hits[i + s][j]++;
        layout_hits[i + s][j + s]++;
        if (l == LEVELS) layout_hits[i][j]++;
      end
    end
  end

  // count level-boundary drains: clocks with busy high and no read issued
  logic drain_prev = 1'b0;
  always @(posedge clk) begin
    logic drain_now;
    drain_now = busy && !dut.rd_valid;
    if (drain_now && !drain_prev) n_drain++;
    drain_prev <= drain_now;
  end

  // odd four-sample sums, where the halving rounds
  always @(posedge clk) begin
    if (rst_n && dut.u_core.row_v) begin
      row_pair_t rp;
      rp = dut.u_core.row_q;
      if (((int'(rp.lo0) + int'(rp.lo1)) & 1) != 0) n_odd_round++;
    end
  end

  // ------------------------------------------------------- stimulus
  task automatic load_image();
    for (int r = 0; r < IMG; r++)
      for (int c = 0; c < IMG; c++) begin
        @(negedge clk);
        pix_we = 1'b1; pix_row = LG'(r); pix_col = LG'(c); pix_data = 8'(img[r][c]);
      end
    @(negedge clk) pix_we = 1'b0;
  endtask

  task automatic run_once(input bit poke_start);
    longint t0, t1;
    int expect_clocks;
    for (int l = 0; l <= LEVELS; l++) blocks_at[l] = 0;
    for (int r = 0; r < IMG; r++)
      for (int c = 0; c < IMG; c++) layout_hits[r][c] = 0;
    build_reference();
    load_image();
    @(negedge clk) start = 1'b1;
    t0 = $time;
    @(negedge clk) start = 1'b0;
    if (poke_start) begin
      repeat (100) @(negedge clk);
      start = 1'b1;                       // must be ignored: busy
      @(negedge clk) start = 1'b0;
      if (busy) n_ignored_start++;
    end
    wait (done === 1'b1);
    t1 = $time;
    @(negedge clk);
    n_runs++;
    // start to done: each level (IMG>>l)^2 clocks + 3 drain clocks
    expect_clocks = 0;
    for (int l = 1; l <= LEVELS; l++) expect_clocks += (IMG >> l) * (IMG >> l) + 3;
    checks++;
    if ((t1 - t0) / 10 != longint'(expect_clocks)) begin
      failures++;
      $display("FAIL: %0d clocks from start to done, expected %0d", (t1 - t0) / 10, expect_clocks);
    end
    for (int l = 1; l <= LEVELS; l++) begin
      checks++;
      if (blocks_at[l] != (IMG >> l) * (IMG >> l)) begin
        failures++;
        $display("FAIL: level %0d produced %0d blocks", l, blocks_at[l]);
      end
    end
    checks++;
    begin
      int bad;
      bad = 0;
      for (int r = 0; r < IMG; r++)
        for (int c = 0; c < IMG; c++) if (layout_hits[r][c] != 1) bad++;
      if (bad != 0) begin
        failures++;
        $display("FAIL: %0d layout positions not covered exactly once", bad);
      end
    end
    $display("run %0d: %0d clocks from start to done", n_runs, (t1 - t0) / 10);
  endtask

  task automatic need(input string what, input int n);
    checks++;
    $display("mechanism %-34s %0d", what, n);
    if (n == 0) begin
      failures++;
      $display("FAIL: mechanism never occurred: %s", what);
    end
  endtask

  initial begin
    repeat (4) @(posedge clk);
    rst_n = 1'b1;
    // image 1: gradient plus noise
    for (int r = 0; r < IMG; r++)
      for (int c = 0; c < IMG; c++)
        img[r][c] = (r + 2 * c + int'($urandom % 24)) % 256;
    run_once(1'b0);
    // image 2: random pixels, with a start pulse while busy
    for (int r = 0; r < IMG; r++)
      for (int c = 0; c < IMG; c++) img[r][c] = int'($urandom % 256);
    run_once(1'b1);

    need("level-1 block from image buffer", n_img_blocks);
    need("level-2/3 block from LL buffer", n_llbuf_blocks);
    need("negative detail coefficient", n_neg_detail);
    need("odd sum rounded by halving", n_odd_round);
    need("pipeline drain between levels", n_drain);
    need("start ignored while busy", n_ignored_start);
    need("completed decomposition", n_runs);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
