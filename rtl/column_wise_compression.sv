// column_wise_compression: column stage of the 2-D Haar DWT on one block.
//
// Takes the row stage's sums and differences of the block's two rows and
// filters them vertically, again with four EHRCAs:
//   LL = (lo0 + lo1) / 2   low along rows, low along columns
//   LH = (lo0 - lo1) / 2   low along rows, high along columns
//   HL = (hi0 + hi1) / 2   high along rows, low along columns
//   HH = (hi0 - hi1) / 2   high along rows, high along columns
// LL is thus (p00 + p01 + p10 + p11) / 2, the block average scaled by two.
// The division is an arithmetic shift right by one (rounding toward minus
// infinity), a choice of this design.
//
// Interface: row_pair_t in, subbands_t out. Combinational.
module column_wise_compression
  import dwt_pkg::*;
(
  input  row_pair_t r,
  output subbands_t q
);

  coef_t       op_a [4];
  coef_t       op_b [4];
  logic  [3:0] sub;
  coef_t       res  [4];

  // Adder 0: LL, 1: LH, 2: HL, 3: HH (before halving).
  assign op_a[0] = r.lo0;  assign op_b[0] = r.lo1;  assign sub[0] = 1'b0;
  assign op_a[1] = r.lo0;  assign op_b[1] = r.lo1;  assign sub[1] = 1'b1;
  assign op_a[2] = r.hi0;  assign op_b[2] = r.hi1;  assign sub[2] = 1'b0;
  assign op_a[3] = r.hi0;  assign op_b[3] = r.hi1;  assign sub[3] = 1'b1;

  for (genvar k = 0; k < 4; k++) begin : g_add
    logic co_unused;
    ehrca #(.WIDTH(COEF_W)) u_add (
      .a    (op_a[k]),
      .b    (sub[k] ? ~op_b[k] : op_b[k]),
      .cin  (sub[k]),
      .s    (res[k]),
      .cout (co_unused)
    );
  end

  assign q.ll = res[0] >>> 1;
  assign q.lh = res[1] >>> 1;
  assign q.hl = res[2] >>> 1;
  assign q.hh = res[3] >>> 1;

endmodule
