// quad_bank_ram: sample buffer in four banks so a 2x2 block reads in one clock.
//
// Sample (row, col) of an image lives in bank {row[0], col[0]} at address
// (row >> 1) * (width / 2) + (col >> 1). The four samples of the 2x2 block
// whose top-left corner is (2i, 2j) therefore sit at one common address,
// i * (width / 2) + j, one in each bank. The address arithmetic is left to
// the user; this module only holds the banks.
//
// Interface: one write port (one sample per clock, into bank wbank) and one
// block read port. Reads are synchronous: rdata holds the banks' contents at
// raddr one clock after raddr is presented; a read of the address being
// written in the same clock returns the old value. rdata[b] is bank b:
// 0 = even row/even column, 1 = even row/odd column, 2 = odd row/even
// column, 3 = odd row/odd column. Contents are not reset.
module quad_bank_ram #(
  parameter int DATA_W = 16,
  parameter int DEPTH  = 16384,
  localparam int AW    = $clog2(DEPTH)
) (
  input  logic              clk,
  input  logic              we,
  input  logic [1:0]        wbank,
  input  logic [AW-1:0]     waddr,
  input  logic [DATA_W-1:0] wdata,
  input  logic [AW-1:0]     raddr,
  output logic [DATA_W-1:0] rdata [4]
);

  for (genvar b = 0; b < 4; b++) begin : g_bank
    logic [DATA_W-1:0] mem [DEPTH];

    always_ff @(posedge clk) begin
      if (we && wbank == 2'(b)) mem[waddr] <= wdata;
      rdata[b] <= mem[raddr];
    end
  end

endmodule
