// dwt2d_top: three-level two-dimensional Haar DWT built on EHRCA adders.
//
// An IMG x IMG image of PIX_W-bit pixels is written into a four-bank image
// buffer, one pixel per clock. After start, the controller runs LEVELS
// levels. Each clock one 2x2 block is read in a single access and passed
// through the two-stage DWT core (row-wise then column-wise compression,
// all additions in 16-bit EHRCAs), which yields the block's LL, HL, LH and
// HH coefficients. Level 1 reads the image; every level writes its LL band
// into an LL buffer in place, and the next level decomposes that band again,
// giving the usual pyramid: LL3 plus HL/LH/HH of levels 1 to 3.
//
// Coefficients leave as a stream: when coef_valid is high, coef holds the
// four coefficients of block (coef_row, coef_col) of level coef_level. In the
// customary single-image layout they belong at (row, col) for LL,
// (row, col + S) for HL, (row + S, col) for LH and (row + S, col + S) for HH,
// with S = IMG >> level. The LL values of levels below LEVELS are
// intermediate results; they are streamed too.
//
// Timing: one block per clock. Level L takes (IMG >> L)^2 clocks plus three
// clocks of pipeline drain; a coefficient appears three clocks after its
// block is read; done pulses one clock after the last coefficient. For the
// default 256 x 256 image: 16384 + 4096 + 1024 blocks, 21513 clocks from
// start to done.
//
// Interface rules: write pixels (pix_we, pix_row, pix_col, pix_data) only
// while busy is low; start is ignored while busy. rst_n is an active-low
// synchronous reset; buffer contents are not reset. IMG must be a power of
// two of at least 8 and at least 2 ** (LEVELS + 1).
//
// The Haar filters, the three levels, LL = (sum of the four pixels) / 2 and
// the 16-bit EHRCA follow the published design; buffering, the streaming
// interface, pipelining, image size and pixel width are choices of this
// implementation.
module dwt2d_top
  import dwt_pkg::*;
#(
  parameter int IMG    = 256,
  parameter int LEVELS = 3,
  parameter int PIX_W  = 8,
  localparam int LG    = $clog2(IMG),
  localparam int LVW   = $clog2(LEVELS + 1)
) (
  input  logic           clk,
  input  logic           rst_n,
  // image load
  input  logic           pix_we,
  input  logic [LG-1:0]  pix_row,
  input  logic [LG-1:0]  pix_col,
  input  logic [PIX_W-1:0] pix_data,
  // control
  input  logic           start,
  output logic           busy,
  output logic           done,
  // coefficient stream
  output logic           coef_valid,
  output logic [LVW-1:0] coef_level,
  output logic [LG-2:0]  coef_row,
  output logic [LG-2:0]  coef_col,
  output subbands_t      coef
);

  localparam int PIPE = 3;   // read, row stage, column stage

  initial begin
    assert ((1 << LG) == IMG && IMG >= 8 && IMG >= (2 << LEVELS))
      else $error("dwt2d_top: IMG (%0d) must be a power of two >= max(8, 2**(LEVELS+1))", IMG);
    assert (PIX_W < COEF_W - 3)
      else $error("dwt2d_top: PIX_W (%0d) too wide for %0d-bit coefficients", PIX_W, COEF_W);
  end

  // ---------------------------------------------------------------- control
  logic           rd_valid;
  logic [LVW-1:0] rd_level;
  logic [LG-2:0]  rd_row, rd_col;

  dwt_ctrl #(
    .IMG    (IMG),
    .LEVELS (LEVELS),
    .PIPE   (PIPE)
  ) u_ctrl (
    .clk      (clk),
    .rst_n    (rst_n),
    .start    (start),
    .busy     (busy),
    .done     (done),
    .rd_valid (rd_valid),
    .rd_level (rd_level),
    .rd_row   (rd_row),
    .rd_col   (rd_col)
  );

  // ----------------------------------------------------------- image buffer
  logic [PIX_W-1:0] img_q [4];

  quad_bank_ram #(
    .DATA_W (PIX_W),
    .DEPTH  (IMG * IMG / 4)
  ) u_img (
    .clk   (clk),
    .we    (pix_we && !busy),
    .wbank ({pix_row[0], pix_col[0]}),
    .waddr ({pix_row[LG-1:1], pix_col[LG-1:1]}),
    .wdata (pix_data),
    .raddr ({rd_row, rd_col}),
    .rdata (img_q)
  );

  // -------------------------------------------------------------- LL buffer
  // LL(i,j) of any level is stored as sample (i,j) of an (IMG/2)-wide image.
  logic [COEF_W-1:0] ll_q [4];
  logic [LG-3:0]     ll_rrow, ll_rcol;

  assign ll_rrow = rd_row[LG-3:0];   // levels >= 2: block index < IMG/4
  assign ll_rcol = rd_col[LG-3:0];

  quad_bank_ram #(
    .DATA_W (COEF_W),
    .DEPTH  (IMG * IMG / 16)
  ) u_ll (
    .clk   (clk),
    .we    (coef_valid),
    .wbank ({coef_row[0], coef_col[0]}),
    .waddr ({coef_row[LG-2:1], coef_col[LG-2:1]}),
    .wdata (coef.ll),
    .raddr ({ll_rrow, ll_rcol}),
    .rdata (ll_q)
  );

  // ------------------------------------------- block assembly and DWT core
  logic           v1;
  logic           src_img1;
  logic [LVW-1:0] lvl1, lvl2;
  logic [LG-2:0]  row1, col1, row2, col2;
  block_t         blk;

  always_ff @(posedge clk) begin
    if (!rst_n) v1 <= 1'b0;
    else        v1 <= rd_valid;
    src_img1 <= (rd_level == LVW'(1));
    lvl1 <= rd_level;  row1 <= rd_row;  col1 <= rd_col;
    lvl2 <= lvl1;      row2 <= row1;    col2 <= col1;
    coef_level <= lvl2;  coef_row <= row2;  coef_col <= col2;
  end

  always_comb begin
    if (src_img1) begin
      blk.p00 = coef_t'({1'b0, img_q[0]});
      blk.p01 = coef_t'({1'b0, img_q[1]});
      blk.p10 = coef_t'({1'b0, img_q[2]});
      blk.p11 = coef_t'({1'b0, img_q[3]});
    end else begin
      blk.p00 = coef_t'(ll_q[0]);
      blk.p01 = coef_t'(ll_q[1]);
      blk.p10 = coef_t'(ll_q[2]);
      blk.p11 = coef_t'(ll_q[3]);
    end
  end

  dwt_core u_core (
    .clk       (clk),
    .rst_n     (rst_n),
    .in_valid  (v1),
    .px        (blk),
    .out_valid (coef_valid),
    .q         (coef)
  );

  // ------------------------------------------------------------ interface
  a_no_load_while_busy : assert property (@(posedge clk) disable iff (!rst_n)
    busy |-> !pix_we)
    else $error("dwt2d_top: pixel write while busy");

endmodule
