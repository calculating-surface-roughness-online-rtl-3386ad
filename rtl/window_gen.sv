// window_gen: forms the 3x3 neighbourhood of every interior pixel of a
// raster-scanned image, the input of the VRC's first column.
//
// Pixels arrive one per clock at most, row by row, left to right, with
// in_valid; in_sof marks the first pixel of a frame and restarts the row and
// column counters (frames may also simply follow each other). Two line
// buffers of WIDTH pixels keep the two previous rows; a 3x3 register window
// shifts one column per accepted pixel. When the accepted pixel is at row
// r >= 2 and column c >= 2, the next clock presents the neighbourhood centred
// on (r-1, c-1) with win_valid, ordered row-major:
//   win[0] win[1] win[2]     row r-2, columns c-2 .. c
//   win[3] win[4] win[5]     row r-1 (win[4] is the centre pixel)
//   win[6] win[7] win[8]     row r
// so a HEIGHT x WIDTH frame yields (HEIGHT-2) x (WIDTH-2) neighbourhoods;
// border pixels produce none. win_last marks the last one of a frame. idle is
// high between frames (no partial frame has been received). The defaults,
// 640 pixels by 512 lines, are the camera resolution of the published vision
// system; the 3x3 size, the interior-only output and the line-buffer scheme
// are this design's choices. The line buffers are read asynchronously.
module window_gen
  import ehw_pkg::*;
#(
  parameter int unsigned WIDTH  = 640,
  parameter int unsigned HEIGHT = 512,
  parameter int unsigned COL_W  = $clog2(WIDTH),
  parameter int unsigned ROW_W  = $clog2(HEIGHT)
)(
  input  logic               clk,
  input  logic               rst_n,
  input  logic               in_valid,
  input  logic               in_sof,
  input  pixel_t             in_pix,
  output logic               win_valid,
  output logic               win_last,
  output pixel_t [N_WIN-1:0] win,
  output logic               idle
);

  pixel_t lb_prev [WIDTH];   // row r-1
  pixel_t lb_prev2[WIDTH];   // row r-2

  logic [COL_W-1:0] col, col_q;
  logic [ROW_W-1:0] row, row_q;
  pixel_t           w [3][3];  // w[row][col], col 2 is the newest

  // Position of the incoming pixel: in_sof forces (0, 0).
  assign col = in_sof ? '0 : col_q;
  assign row = in_sof ? '0 : row_q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      col_q     <= '0;
      row_q     <= '0;
      win_valid <= 1'b0;
      win_last  <= 1'b0;
    end else begin
      win_valid <= 1'b0;
      win_last  <= 1'b0;
      if (in_valid) begin
        win_valid <= (row >= ROW_W'(2)) && (col >= COL_W'(2));
        win_last  <= (row == ROW_W'(HEIGHT - 1)) && (col == COL_W'(WIDTH - 1));
        if (col == COL_W'(WIDTH - 1)) begin
          col_q <= '0;
          row_q <= (row == ROW_W'(HEIGHT - 1)) ? '0 : row + 1'b1;
        end else begin
          col_q <= col + 1'b1;
          row_q <= row;
        end
      end else if (in_sof) begin
        col_q <= '0;
        row_q <= '0;
      end
    end
  end

  always_ff @(posedge clk) begin
    if (in_valid) begin
      lb_prev [col] <= in_pix;
      lb_prev2[col] <= lb_prev[col];
      for (int r = 0; r < 3; r++) begin
        w[r][0] <= w[r][1];
        w[r][1] <= w[r][2];
      end
      w[0][2] <= lb_prev2[col];
      w[1][2] <= lb_prev[col];
      w[2][2] <= in_pix;
    end
  end

  always_comb begin
    for (int r = 0; r < 3; r++)
      for (int c = 0; c < 3; c++)
        win[3*r + c] = w[r][c];
  end

  assign idle = (row_q == '0) && (col_q == '0);

  if (WIDTH < 3 || HEIGHT < 3) begin : g_bad_size
    $error("window_gen: the frame must be at least 3 x 3 pixels");
  end

endmodule
