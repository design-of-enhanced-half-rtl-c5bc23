// tb_dwt_ctrl: runs the level sequencer on a 16 x 16 image, three levels,
// and checks the issued block sequence clock by clock: raster order within
// each level, 64/16/4 blocks, exactly PIPE idle clocks between levels, busy,
// a one-clock done pulse PIPE+1 clocks after the last block, and that a
// start while busy is ignored.
module tb_dwt_ctrl;
  localparam int IMG = 16, LEVELS = 3, PIPE = 3;
  localparam int LVW = $clog2(LEVELS + 1), BW = $clog2(IMG / 2);
  logic           clk = 1'b0, rst_n = 1'b0, start = 1'b0;
  logic           busy, done, rd_valid;
  logic [LVW-1:0] rd_level;
  logic [BW-1:0]  rd_row, rd_col;
  int             checks = 0, failures = 0;

  dwt_ctrl #(.IMG(IMG), .LEVELS(LEVELS), .PIPE(PIPE)) dut (
    .clk(clk), .rst_n(rst_n), .start(start), .busy(busy), .done(done),
    .rd_valid(rd_valid), .rd_level(rd_level), .rd_row(rd_row), .rd_col(rd_col));

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic expect_cycle(input bit v, input int lvl, input int r, input int c,
                              input bit b, input bit d);
    @(posedge clk) #1;
    checks++;
    if (rd_valid != v || busy != b || done != d ||
        (v && (int'(rd_level) != lvl || int'(rd_row) != r || int'(rd_col) != c))) begin
      failures++;
      $display("FAIL: got v=%0d L=%0d (%0d,%0d) busy=%0d done=%0d, expected v=%0d L=%0d (%0d,%0d) busy=%0d done=%0d",
               rd_valid, rd_level, rd_row, rd_col, busy, done, v, lvl, r, c, b, d);
    end
  endtask

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    for (int run = 0; run < 2; run++) begin
      @(negedge clk) start = 1'b1;
      @(negedge clk) start = 1'b0;
      #0;
      // state after the start edge: level 1 block (0,0) issued now
      checks++;
      if (!rd_valid || !busy || rd_level != 1 || rd_row != 0 || rd_col != 0) begin
        failures++;
        $display("FAIL: first block not issued right after start");
      end
      for (int lvl = 1; lvl <= LEVELS; lvl++) begin
        int side;
        side = IMG >> lvl;
        for (int r = 0; r < side; r++)
          for (int c = 0; c < side; c++) begin
            if (lvl == 1 && r == 0 && c == 0) continue;
            if (lvl == 2 && r == 1 && c == 1 && run == 1) start = 1'b1;  // ignored
            expect_cycle(1'b1, lvl, r, c, 1'b1, 1'b0);
            start = 1'b0;
          end
        for (int k = 0; k < PIPE; k++) expect_cycle(1'b0, 0, 0, 0, 1'b1, 1'b0);
      end
      expect_cycle(1'b0, 0, 0, 0, 1'b0, 1'b1);
      expect_cycle(1'b0, 0, 0, 0, 1'b0, 1'b0);
      repeat (3) @(posedge clk);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
