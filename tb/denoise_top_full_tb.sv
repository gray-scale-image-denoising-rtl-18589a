// denoise_top_full_tb: the denoiser at its full size (1024x1024 image, all
// parameters at their defaults). A synthetic noisy gray image (gradient plus
// random impulse noise) is loaded, filtered once with the 5x5 window and once
// with the 4x4 window; each time done must come IMG_W*IMG_H+5 clocks after the
// start edge, and every output pixel is read back and compared with
// floor(mean of its K x K block) computed here. The image quality measure used
// for such filters is also reported: the PSNR of the noisy image and of the
// filtered one against the clean image (the filtered pixel at (y,x) is compared
// with the mean of the clean K x K block it covers); filtering must raise it.
// Finally it waits for a VGA vertical sync pulse.
`timescale 1ns/1ps
module denoise_top_full_tb;
  import denoise_pkg::*;
  localparam int W = 1024, H = 1024, N = W*H, AW = 20;
  logic clk = 0, rst_n = 0, load_we = 0, start = 0, win5 = 1, busy, done;
  logic [AW-1:0] load_addr = '0, rd_addr = '0;
  pix_t load_data = '0, rd_data;
  logic vga_hsync, vga_vsync;
  logic [3:0] vga_r, vga_g, vga_b;
  pix_t img [H][W];
  pix_t clean [H][W];
  real  psnr_noisy;
  int checks = 0, failures = 0, cycle = 0;

  denoise_top dut (.*);

  always #5 clk = ~clk;
  always @(posedge clk) cycle++;

  initial begin
    #200ms;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic run_frame(logic five);
    int t0, k, bad;
    real sq, mse, psnr;
    k = five ? 5 : 4;
    bad = 0;
    sq = 0.0;
    @(negedge clk);
    win5 = five; start = 1; t0 = cycle;
    @(negedge clk);
    start = 0;
    while (!done) @(negedge clk);
    checks++;
    if (cycle - t0 != N + 6) begin
      failures++;
      $display("FAIL frame took %0d clocks, want %0d", cycle - t0 - 1, N + 5);
    end
    for (int y = 0; y <= H - k; y++)
      for (int x = 0; x <= W - k; x++) begin
        int s, sc;
        s = 0;
        sc = 0;
        for (int r = 0; r < k; r++) for (int c = 0; c < k; c++) begin
          s  += img[y+r][x+c];
          sc += clean[y+r][x+c];
        end
        rd_addr = AW'(y * W + x);
        @(negedge clk);
        checks++;
        if (rd_data != pix_t'(s / (k*k))) begin
          failures++;
          if (bad++ < 5) $display("FAIL k=%0d (%0d,%0d) got %0d want %0d", k, y, x, rd_data, s / (k*k));
        end
        sq += (real'(rd_data) - real'(sc) / (k*k)) ** 2;
      end
    mse  = sq / ((H-k+1)*(W-k+1));
    psnr = 10.0 * $log10(255.0 * 255.0 / mse);
    $display("window %0d: MSE %0.3f PSNR %0.3f dB (noisy image: PSNR %0.3f dB)", k, mse, psnr, psnr_noisy);
    checks++;
    if (!(psnr > psnr_noisy)) begin
      failures++;
      $display("FAIL filtering did not raise the PSNR");
    end
    $display("window %0d: frame done, %0d pixels compared", k, (H-k+1)*(W-k+1));
  endtask

  initial begin
    repeat (4) @(negedge clk);
    rst_n = 1;
    begin
      real sq;
      sq = 0.0;
      foreach (img[y, x]) begin
        int v;
        v = (y + x) / 8;
        clean[y][x] = pix_t'(v);
        if ($urandom_range(0, 9) == 0) v = $urandom_range(0, 1) ? 255 : 0;
        img[y][x] = pix_t'(v);
        sq += (real'(img[y][x]) - real'(clean[y][x])) ** 2;
      end
      psnr_noisy = 10.0 * $log10(255.0 * 255.0 * N / sq);
    end
    for (int i = 0; i < N; i++) begin
      @(negedge clk);
      load_we = 1; load_addr = AW'(i); load_data = img[i / W][i % W];
    end
    @(negedge clk) load_we = 0;
    run_frame(1);
    run_frame(0);
    @(negedge vga_vsync);
    checks++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
