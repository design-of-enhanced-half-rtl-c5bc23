// tb_quad_bank_ram: fills a small four-bank buffer with random words through
// the single write port, then reads every address and checks all four banks
// one clock after the address, against a model array. Also checks that a
// read of the address being written in the same clock returns the old word.
module tb_quad_bank_ram;
  localparam int DW = 12, DEPTH = 64, AW = 6;
  logic          clk = 1'b0;
  logic          we;
  logic [1:0]    wbank;
  logic [AW-1:0] waddr, raddr;
  logic [DW-1:0] wdata;
  logic [DW-1:0] rdata [4];
  logic [DW-1:0] model [4][DEPTH];
  int            checks = 0, failures = 0;

  quad_bank_ram #(.DATA_W(DW), .DEPTH(DEPTH)) dut (
    .clk(clk), .we(we), .wbank(wbank), .waddr(waddr), .wdata(wdata),
    .raddr(raddr), .rdata(rdata));

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    we = 1'b0; raddr = '0; waddr = '0; wbank = '0; wdata = '0;
    // fill
    for (int b = 0; b < 4; b++)
      for (int a = 0; a < DEPTH; a++) begin
        @(negedge clk);
        we = 1'b1; wbank = 2'(b); waddr = AW'(a); wdata = DW'($urandom);
        model[b][a] = wdata;
      end
    @(negedge clk) we = 1'b0;
    // read back in random order
    for (int n = 0; n < 300; n++) begin
      logic [AW-1:0] ra;
      ra = AW'($urandom);
      @(negedge clk) raddr = ra;
      @(posedge clk) #1;
      for (int b = 0; b < 4; b++) begin
        checks++;
        if (rdata[b] != model[b][ra]) begin
          failures++;
          $display("FAIL bank %0d addr %0d: %h expected %h", b, ra, rdata[b], model[b][ra]);
        end
      end
    end
    // read during write: old data, then new data
    @(negedge clk);
    we = 1'b1; wbank = 2'd2; waddr = 6'd9; raddr = 6'd9; wdata = ~model[2][9];
    @(posedge clk) #1;
    checks++;
    if (rdata[2] != model[2][9]) begin
      failures++;
      $display("FAIL read-during-write returned %h expected old %h", rdata[2], model[2][9]);
    end
    model[2][9] = wdata;
    @(negedge clk) we = 1'b0;
    @(posedge clk) #1;
    checks++;
    if (rdata[2] != model[2][9] || rdata[1] != model[1][9]) begin
      failures++;
      $display("FAIL after write: %h expected %h", rdata[2], model[2][9]);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
