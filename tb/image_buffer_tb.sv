// image_buffer_tb: streams three 7-wide frames of random pixels, with random
// idle cycles, through the line buffer. For each pixel at (y, x), the column
// that follows one cycle later must hold the pixels (y-4 .. y, x) of the same
// frame; rows above the frame are not checked.
`timescale 1ns/1ps
module image_buffer_tb;
  import denoise_pkg::*;
  localparam int W = 7, H = 6;
  logic clk = 0, rst_n = 0, in_valid = 0, sof = 0, col_valid;
  pix_t in_pix = '0;
  win_col_t col;
  pix_t img [3][H][W];
  int   ef = 0, cf = 0;   // frame of the checked / driven pixel
  int checks = 0, failures = 0;
  int ey = -1, ex = 0;     // position of the pixel sent in the last cycle

  image_buffer #(.IMG_W(W)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // at each falling edge: check the column for the pixel driven one cycle
  // earlier (ey, ex; ey < 0 means no pixel), then drive the next input
  task automatic step(logic v, int y, int x);
    @(negedge clk);
    if (ey >= 0) begin
      checks++;
      if (!col_valid) begin failures++; $display("FAIL col_valid missing"); end
      for (int k = 0; k < 5; k++)
        if (ey - 4 + k >= 0) begin
          checks++;
          if (col[k] !== img[ef][ey-4+k][ex]) begin
            failures++;
            $display("FAIL y=%0d x=%0d k=%0d got %0d want %0d", ey, ex, k, col[k], img[ef][ey-4+k][ex]);
          end
        end
    end else if (col_valid) begin
      failures++; $display("FAIL col_valid without input");
    end
    in_valid = v;
    sof      = v && x == 0 && y == 0;
    in_pix   = v ? img[cf][y][x] : 8'($urandom);
    ey       = v ? y : -1;
    ex       = x;
    ef       = cf;
  endtask

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1;
    foreach (img[f, y, x]) img[f][y][x] = 8'($urandom);
    for (int f = 0; f < 3; f++) begin
      cf = f;
      for (int y = 0; y < H; y++)
        for (int x = 0; x < W; x++) begin
          while ($urandom_range(0, 3) == 0) step(0, 0, 0);
          step(1, y, x);
        end
    end
    step(0, 0, 0);
    step(0, 0, 0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
