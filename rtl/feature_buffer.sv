// feature_buffer: the IFMAP partition of a core's input buffer, one 3x3 window.
//
// Values are written one at a time at (row, col) as they arrive from memory.
// Moving to the next window along a row, `shift` moves every column STRIDE
// places to the left in one cycle, so the K-STRIDE columns the two windows
// share are kept and only STRIDE new columns need to be read (with stride 2
// the last column of a window becomes the first of the next). The buffer holds
// the current window while the next one is being assembled only in the
// overlapping columns; the cores read a window completely before issuing it.
// Output is the window in row-major order, combinational from the registers.
module feature_buffer
  import conv_pkg::*;
#(
  parameter int unsigned STRIDE = 2
)(
  input  logic       clk,
  input  logic       wr_en,
  input  logic [1:0] wr_row,
  input  logic [1:0] wr_col,
  input  data_t      wr_data,
  input  logic       shift,
  output data_t      x [KK]
);

  data_t win [K][K];

  always_ff @(posedge clk) begin
    if (shift) begin
      for (int r = 0; r < K; r++)
        for (int c = 0; c < K; c++)
          if (c + STRIDE < K) win[r][c] <= win[r][c+STRIDE];
    end else if (wr_en && wr_row < 2'(K) && wr_col < 2'(K)) begin
      win[wr_row][wr_col] <= wr_data;
    end
  end

  always_comb
    for (int r = 0; r < K; r++)
      for (int c = 0; c < K; c++)
        x[r*K+c] = win[r][c];

endmodule
