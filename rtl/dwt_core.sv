// dwt_core: pipelined 2x2 two-dimensional Haar DWT unit.
//
// Row-wise compression, a pipeline register, column-wise compression and an
// output register. It accepts one 2x2 block per clock and delivers that
// block's LL, HL, LH and HH coefficients two clocks later, so a level of N x N
// samples takes N*N/4 clocks. The register placement is this design's choice.
//
// Interface: in_valid/px are sampled at the rising edge; out_valid/q follow
// two edges later. rst_n is an active-low synchronous reset of the valid bits.
module dwt_core
  import dwt_pkg::*;
(
  input  logic      clk,
  input  logic      rst_n,
  input  logic      in_valid,
  input  block_t    px,
  output logic      out_valid,
  output subbands_t q
);

  row_pair_t row_c, row_q;
  logic      row_v;
  subbands_t col_c;

  row_wise_compression u_row (
    .px (px),
    .r  (row_c)
  );

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      row_v     <= 1'b0;
      out_valid <= 1'b0;
    end else begin
      row_v     <= in_valid;
      out_valid <= row_v;
    end
  end

  always_ff @(posedge clk) begin
    if (in_valid) row_q <= row_c;
    if (row_v)    q     <= col_c;
  end

  column_wise_compression u_col (
    .r (row_q),
    .q (col_c)
  );

endmodule
