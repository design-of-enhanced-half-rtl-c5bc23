// dwt_ctrl: level sequencer for the multi-level 2-D DWT.
//
// After start it runs LEVELS decomposition levels. Level L works on the
// (IMG >> (L-1)) square image left by the level before (the input image for
// level 1, the previous LL band after that) and walks its (IMG >> L) square
// grid of 2x2 blocks in raster order, issuing one block per clock. Between
// levels it waits PIPE clocks so that the last LL coefficient of a level has
// been written back before the next level reads it. Raster order makes the
// in-place LL write-back safe within a level: LL(i,j) overwrites the sample
// at (i,j), which was read earlier by block (i/2, j/2).
//
// Interface: start is honoured only when idle; busy is high from the clock
// after start until the end; done pulses for one clock PIPE+1 clocks after
// the last block is issued. While rd_valid is high, rd_level/rd_row/rd_col
// name the block to read this clock. All outputs are registered or decoded
// from registers. rst_n is an active-low synchronous reset.
module dwt_ctrl #(
  parameter int IMG    = 256,
  parameter int LEVELS = 3,
  parameter int PIPE   = 3,
  localparam int LVW   = $clog2(LEVELS + 1),
  localparam int BW    = $clog2(IMG / 2)
) (
  input  logic           clk,
  input  logic           rst_n,
  input  logic           start,
  output logic           busy,
  output logic           done,
  output logic           rd_valid,
  output logic [LVW-1:0] rd_level,
  output logic [BW-1:0]  rd_row,
  output logic [BW-1:0]  rd_col
);

  typedef enum logic [1:0] {S_IDLE, S_RUN, S_DRAIN} state_t;

  state_t                  state;
  logic [$clog2(PIPE+1)-1:0] drain_cnt;
  logic [BW-1:0]           last;   // last block index of the current level

  assign last     = BW'((IMG >> rd_level) - 1);
  assign busy     = (state != S_IDLE);
  assign rd_valid = (state == S_RUN);

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      state     <= S_IDLE;
      done      <= 1'b0;
      rd_level  <= '0;
      rd_row    <= '0;
      rd_col    <= '0;
      drain_cnt <= '0;
    end else begin
      done <= 1'b0;
      unique case (state)
        S_IDLE: begin
          if (start) begin
            rd_level <= LVW'(1);
            rd_row   <= '0;
            rd_col   <= '0;
            state    <= S_RUN;
          end
        end
        S_RUN: begin
          if (rd_col == last) begin
            rd_col <= '0;
            if (rd_row == last) begin
              rd_row    <= '0;
              drain_cnt <= ($bits(drain_cnt))'(PIPE - 1);
              state     <= S_DRAIN;
            end else begin
              rd_row <= rd_row + 1'b1;
            end
          end else begin
            rd_col <= rd_col + 1'b1;
          end
        end
        S_DRAIN: begin
          if (drain_cnt == '0) begin
            if (rd_level == LVW'(LEVELS)) begin
              state <= S_IDLE;
              done  <= 1'b1;
            end else begin
              rd_level <= rd_level + 1'b1;
              state    <= S_RUN;
            end
          end else begin
            drain_cnt <= drain_cnt - 1'b1;
          end
        end
        default: state <= S_IDLE;
      endcase
    end
  end

endmodule
