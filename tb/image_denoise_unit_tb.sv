// image_denoise_unit_tb: random windows in both window modes, the mode changing
// from cycle to cycle, with random gaps in in_valid. Each result must appear
// exactly 2 cycles after its window and equal floor(mean) computed here:
// sum of all 25 pixels / 25, or sum of rows/columns 1..4 / 16. Also checks
// the extreme windows (all 0, all 255) and sums around multiples of 25.
`timescale 1ns/1ps
module image_denoise_unit_tb;
  import denoise_pkg::*;
  logic clk = 0, rst_n = 0, in_valid = 0, win5 = 0, out_valid;
  win_t win;
  pix_t out_pix;
  int checks = 0, failures = 0, cycle = 0;
  int exp_q[$], cyc_q[$];
  int n5 = 0, n4 = 0;

  image_denoise_unit dut (.*);

  always #5 clk = ~clk;
  always @(posedge clk) cycle++;

  initial begin
    #200000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic int ref_mean(win_t w, logic five);
    int s = 0;
    if (five) begin
      for (int r = 0; r < 5; r++) for (int c = 0; c < 5; c++) s += w[r][c];
      return s / 25;
    end
    for (int r = 1; r < 5; r++) for (int c = 1; c < 5; c++) s += w[r][c];
    return s / 16;
  endfunction

  // output monitor
  always @(negedge clk) begin
    int e, c;
    if (rst_n && out_valid) begin
      checks++;
      if (exp_q.size() == 0) begin
        failures++;
        $display("FAIL unexpected output");
      end else begin
        e = exp_q.pop_front();
        c = cyc_q.pop_front();
        if (out_pix != 8'(e) || cycle - c != 2) begin
          failures++;
          $display("FAIL got %0d want %0d latency %0d", out_pix, e, cycle - c);
        end
      end
    end
  end

  task automatic drive(win_t w, logic five);
    @(negedge clk);
    win = w; win5 = five; in_valid = 1;
    exp_q.push_back(ref_mean(w, five));
    cyc_q.push_back(cycle);
    if (five) n5++; else n4++;
    @(negedge clk);
    in_valid = 0;
  endtask

  initial begin
    win_t w;
    repeat (3) @(negedge clk);
    rst_n = 1;
    foreach (w[r, c]) w[r][c] = 8'd255;
    drive(w, 1); drive(w, 0);
    foreach (w[r, c]) w[r][c] = 8'd0;
    drive(w, 1); drive(w, 0);
    // sums 24, 25, 26, ... around multiples of 25
    for (int s = 0; s < 6375; s += 97) begin
      int left = s;
      foreach (w[r, c]) begin
        w[r][c] = (left > 255) ? 8'd255 : 8'(left);
        left -= int'(w[r][c]);
      end
      drive(w, 1);
    end
    for (int t = 0; t < 2000; t++) begin
      foreach (w[r, c]) w[r][c] = 8'($urandom);
      @(negedge clk);
      win = w; win5 = 1'($urandom); in_valid = 1'($urandom_range(0, 3) != 0);
      if (in_valid) begin
        exp_q.push_back(ref_mean(w, win5));
        cyc_q.push_back(cycle);
        if (win5) n5++; else n4++;
      end
    end
    @(negedge clk) in_valid = 0;
    repeat (5) @(negedge clk);
    checks++;
    if (exp_q.size() != 0 || n5 == 0 || n4 == 0) begin
      failures++;
      $display("FAIL %0d results missing, n5=%0d n4=%0d", exp_q.size(), n5, n4);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
