// row_wise_compression: row stage of the 2-D Haar DWT on one 2x2 block.
//
// Along each of the block's two rows it applies the Haar low-pass filter
// (sum of the two horizontal neighbours) and high-pass filter (their
// difference). Producing one low and one high value per pair of samples is
// the downsampling by two along the rows. The four results come from four
// EHRCAs; a difference is formed as x + ~y + 1 by inverting the second
// operand and setting the adder's carry in.
//
// Interface: block_t in, row_pair_t out (lo = sums, hi = differences, index
// 0 = top row). Combinational. Results are not scaled here; the column stage
// applies the single division by two of the two-dimensional transform.
module row_wise_compression
  import dwt_pkg::*;
(
  input  block_t    px,
  output row_pair_t r
);

  coef_t       op_a [4];
  coef_t       op_b [4];
  logic  [3:0] sub;
  coef_t       res  [4];

  // Adder 0: top-row sum, 1: bottom-row sum, 2: top-row difference,
  // 3: bottom-row difference.
  assign op_a[0] = px.p00;  assign op_b[0] = px.p01;  assign sub[0] = 1'b0;
  assign op_a[1] = px.p10;  assign op_b[1] = px.p11;  assign sub[1] = 1'b0;
  assign op_a[2] = px.p00;  assign op_b[2] = px.p01;  assign sub[2] = 1'b1;
  assign op_a[3] = px.p10;  assign op_b[3] = px.p11;  assign sub[3] = 1'b1;

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

  assign r.lo0 = res[0];
  assign r.lo1 = res[1];
  assign r.hi0 = res[2];
  assign r.hi1 = res[3];

endmodule
