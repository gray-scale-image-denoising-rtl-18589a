// image_window_tb: feeds an 8x7 image column by column (as the line buffer would
// deliver it, with random idle cycles), three frames, alternating the 5x5 and
// 4x4 modes. Every window flagged valid must hold the right K x K block, its
// out_row/out_col must be its top-left pixel, exactly (H-K+1)*(W-K+1) windows
// must be flagged per frame, and last_win must mark the frame's final column.
`timescale 1ns/1ps
module image_window_tb;
  import denoise_pkg::*;
  localparam int W = 8, H = 7;
  logic clk = 0, rst_n = 0, col_valid = 0, sof = 0, win5 = 1;
  win_col_t col;
  win_t win;
  logic win_valid, last_win;
  logic [2:0] out_row, out_col;
  pix_t img [H][W];
  int checks = 0, failures = 0;
  int py = -1, px = 0, nwin = 0, nlast = 0;

  image_window #(.IMG_W(W), .IMG_H(H)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // check the outputs for the column driven one cycle earlier, then drive
  task automatic step(logic v, int y, int x);
    int k, exp_valid;
    @(negedge clk);
    k = win5 ? 5 : 4;
    exp_valid = (py >= k-1) && (px >= k-1);
    checks++;
    if (win_valid !== 1'(exp_valid) || last_win !== 1'(py == H-1 && px == W-1)) begin
      failures++;
      $display("FAIL flags at y=%0d x=%0d valid=%b last=%b", py, px, win_valid, last_win);
    end
    if (win_valid) nwin++;
    if (last_win) nlast++;
    if (exp_valid) begin
      checks++;
      if (int'(out_row) != py-k+1 || int'(out_col) != px-k+1) begin
        failures++;
        $display("FAIL position %0d,%0d at y=%0d x=%0d", out_row, out_col, py, px);
      end
      for (int r = 5-k; r < 5; r++)
        for (int c = 5-k; c < 5; c++) begin
          checks++;
          if (win[r][c] !== img[py-4+r][px-4+c]) begin
            failures++;
            $display("FAIL win[%0d][%0d] at y=%0d x=%0d", r, c, py, px);
          end
        end
    end
    col_valid = v;
    sof = v && x == 0 && y == 0;
    for (int r = 0; r < 5; r++) col[r] = (v && y-4+r >= 0) ? img[y-4+r][x] : 8'($urandom);
    py = v ? y : -1;
    px = x;
  endtask

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1;
    for (int f = 0; f < 3; f++) begin
      int k;
      foreach (img[y, x]) img[y][x] = 8'($urandom);
      step(0, 0, 0);
      win5 = (f != 1);
      k = win5 ? 5 : 4;
      nwin = 0; nlast = 0;
      for (int y = 0; y < H; y++)
        for (int x = 0; x < W; x++) begin
          while ($urandom_range(0, 4) == 0) step(0, 0, 0);
          step(1, y, x);
        end
      step(0, 0, 0);
      checks++;
      if (nwin != (H-k+1)*(W-k+1) || nlast != 1) begin
        failures++;
        $display("FAIL frame %0d: %0d windows (want %0d), %0d last", f, nwin, (H-k+1)*(W-k+1), nlast);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
