// image_window: 5x5 sliding window of registers.
// Each valid column from the line buffer shifts the window one place left and
// enters as column 4, so win[r][c] holds the pixel (y-4+r, x-4+c) when the newest
// column belongs to image row y, column x. Row and column counters follow the
// stream (sof restarts them). win_valid is raised when the K x K window used by
// the filter (K = 5, or K = 4 using rows/columns 1..4) lies wholly inside the
// current frame, i.e. x >= K-1 and y >= K-1; out_row/out_col then give the
// position of that window's top-left pixel, which is where the filtered pixel is
// stored. Image borders produce no output, so the filtered image is
// (IMG_H-K+1) x (IMG_W-K+1). last_win marks the frame's final window.
// Outputs are registered together with the window (one cycle after col_valid).
module image_window
  import denoise_pkg::*;
#(
  parameter int unsigned IMG_W = 1024,
  parameter int unsigned IMG_H = 1024,
  localparam int unsigned XW   = $clog2(IMG_W),
  localparam int unsigned YW   = $clog2(IMG_H)
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          col_valid,
  input  logic          sof,
  input  win_col_t      col,
  input  logic          win5,
  output win_t          win,
  output logic          win_valid,
  output logic          last_win,
  output logic [YW-1:0] out_row,
  output logic [XW-1:0] out_col
);
  logic [XW-1:0] x, xa;
  logic [YW-1:0] y, ya;
  logic [2:0]    k;         // window side used by the filter

  assign xa = sof ? '0 : x;
  assign ya = sof ? '0 : y;
  assign k  = win5 ? 3'd5 : 3'd4;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      x         <= '0;
      y         <= '0;
      win_valid <= 1'b0;
      last_win  <= 1'b0;
      out_row   <= '0;
      out_col   <= '0;
    end else begin
      win_valid <= 1'b0;
      last_win  <= 1'b0;
      if (col_valid) begin
        if (xa == XW'(IMG_W-1)) begin
          x <= '0;
          y <= (ya == YW'(IMG_H-1)) ? '0 : ya + 1'b1;
        end else begin
          x <= xa + 1'b1;
          y <= ya;
        end
        win_valid <= (32'(xa) >= 32'(k) - 1) && (32'(ya) >= 32'(k) - 1);
        last_win  <= (xa == XW'(IMG_W-1)) && (ya == YW'(IMG_H-1));
        out_row   <= YW'(32'(ya) - (32'(k) - 1));
        out_col   <= XW'(32'(xa) - (32'(k) - 1));
      end
    end
  end

  always_ff @(posedge clk) begin
    if (col_valid) begin
      for (int r = 0; r < WMAX; r++) begin
        for (int c = 0; c < WMAX-1; c++) win[r][c] <= win[r][c+1];
        win[r][WMAX-1] <= col[r];
      end
    end
  end
endmodule
