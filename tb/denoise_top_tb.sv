// denoise_top_tb: end-to-end test of the denoiser on a small image (12x10, VGA
// pixel tick every 2 clocks). A noisy gray test image (a gradient with random
// impulse noise) is loaded through the load port, then filtered three times:
// 5x5 window, 4x4 window, 5x5 again on a new image. For each frame it checks
//  - done arrives IMG_W*IMG_H+5 clocks after start and busy covers the frame,
//  - a start pulse during a frame is ignored,
//  - every output pixel read back equals floor(mean of its K x K block),
//    computed here from the loaded image.
// It also lets the VGA scan run over a whole display frame and checks that the
// image area shows the filtered pixels' upper 4 bits. Counted mechanisms (each
// must occur): 5x5 frames, 4x4 frames, mode switches, ignored starts, border
// positions that produce no output, VGA frames (vsync pulses).
`timescale 1ns/1ps
module denoise_top_tb;
  import denoise_pkg::*;
  localparam int W = 12, H = 10, N = W*H, DIV = 2;
  localparam int AW = $clog2(N);
  logic clk = 0, rst_n = 0, load_we = 0, start = 0, win5 = 1, busy, done;
  logic [AW-1:0] load_addr = '0, rd_addr = '0;
  pix_t load_data = '0, rd_data;
  logic vga_hsync, vga_vsync;
  logic [3:0] vga_r, vga_g, vga_b;
  pix_t img [H][W];
  int checks = 0, failures = 0, cycle = 0;
  int n_frames5 = 0, n_frames4 = 0, n_switch = 0, n_ignored = 0, n_border = 0, n_vsync = 0;

  denoise_top #(.IMG_W(W), .IMG_H(H), .VGA_DIV(DIV)) dut (.*);

  always #5 clk = ~clk;
  always @(posedge clk) cycle++;

  logic prev_vs = 1;
  always @(posedge clk) begin
    if (prev_vs && !vga_vsync) n_vsync++;
    prev_vs <= vga_vsync;
  end

  initial begin
    #50ms;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(logic cond, string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL %s", what); end
  endtask

  task automatic load_image(int seed);
    foreach (img[y, x]) begin
      int v = 20 * y + 8 * x + seed;
      if ($urandom_range(0, 5) == 0) v = $urandom_range(0, 1) ? 255 : 0;   // impulse noise
      img[y][x] = pix_t'(v > 255 ? 255 : v);
    end
    for (int i = 0; i < N; i++) begin
      @(negedge clk);
      load_we = 1; load_addr = AW'(i); load_data = img[i / W][i % W];
    end
    @(negedge clk) load_we = 0;
  endtask

  task automatic run_frame(logic five);
    int t0, k;
    k = five ? 5 : 4;
    @(negedge clk);
    if (win5 != five) n_switch++;
    win5 = five; start = 1; t0 = cycle;
    @(negedge clk);
    start = 0;
    check(busy, "busy after start");
    repeat (10) @(negedge clk);
    start = 1; win5 = !five;             // must be ignored while busy
    @(negedge clk);
    start = 0; win5 = five;
    n_ignored++;
    while (!done) begin
      @(negedge clk);
      if (!done && !busy) begin check(0, "busy dropped early"); break; end
    end
    // t0 is the cycle before the edge that samples start; done follows that edge by N+5 clocks
    check(cycle - t0 == N + 6, $sformatf("frame took %0d clocks, want %0d", cycle - t0 - 1, N + 5));
    @(negedge clk);
    check(!busy, "idle after done");
    // read back and compare
    for (int y = 0; y < H; y++)
      for (int x = 0; x < W; x++) begin
        int s = 0;
        if (y > H - k || x > W - k) begin n_border++; continue; end
        for (int r = 0; r < k; r++) for (int c = 0; c < k; c++) s += img[y+r][x+c];
        rd_addr = AW'(y * W + x);
        @(negedge clk);
        check(rd_data == pix_t'(s / (k*k)), $sformatf("pixel (%0d,%0d) k=%0d got %0d want %0d",
              y, x, k, rd_data, s / (k*k)));
      end
    if (five) n_frames5++; else n_frames4++;
  endtask

  initial begin
    repeat (4) @(negedge clk);
    rst_n = 1;
    check(!busy && !done, "idle after reset");
    load_image(0);
    run_frame(1);
    run_frame(0);
    load_image(37);
    run_frame(1);
    // one full VGA frame: compare the image area with the filtered pixels
    begin
      int hh = 0, vv = 0, nok = 0, nbad = 0;
      int div_ph;
      // wait for the start of a frame: vsync rising edge is followed by back porch;
      // follow the counters from frame_start instead
      @(posedge dut.u_vga.frame_start);
      #1;
      // frame_start is registered at the tick of pixel (0,0); outputs then show pixel (0,0)
      for (int n = 0; n < 800 * 525; n++) begin
        hh = n % 800; vv = n / 800;
        if (hh < W - 4 && vv < H - 4) begin
          pix_t e;
          int s;
          s = 0;
          for (int r = 0; r < 5; r++) for (int c = 0; c < 5; c++) s += img[vv+r][hh+c];
          e = pix_t'(s / 25);
          if (vga_r == e[7:4] && vga_g == e[7:4] && vga_b == e[7:4]) nok++;
          else begin nbad++; if (nbad < 6) $display("VGA (%0d,%0d) got %h want %h", vv, hh, vga_r, e[7:4]); end
        end else if (hh >= 640 || vv >= 480 || hh >= W || vv >= H) begin
          if (vga_r != 0 || vga_g != 0 || vga_b != 0) nbad++;
        end
        repeat (DIV) @(posedge clk);
        #1;
      end
      check(nbad == 0 && nok == (W-4)*(H-4), $sformatf("VGA frame: %0d right, %0d wrong", nok, nbad));
    end
    check(n_frames5 > 0, "no 5x5 frame");
    check(n_frames4 > 0, "no 4x4 frame");
    check(n_switch > 0, "no mode switch");
    check(n_ignored > 0, "no ignored start");
    check(n_border > 0, "no border position");
    check(n_vsync > 0, "no VGA frame");
    $display("mechanisms: frames5=%0d frames4=%0d switches=%0d ignored_starts=%0d border=%0d vsync=%0d",
             n_frames5, n_frames4, n_switch, n_ignored, n_border, n_vsync);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
