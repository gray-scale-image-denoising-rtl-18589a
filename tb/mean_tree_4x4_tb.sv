// mean_tree_4x4_tb: the 16-pixel reversible adder tree against a plain sum, for
// all-zero, all-255, single-pixel (each position, so every leaf of the
// tree is exercised) and random windows.
`timescale 1ns/1ps
module mean_tree_4x4_tb;
  import denoise_pkg::*;
  pix_t        pix [16];
  logic [11:0] sum;
  int checks = 0, failures = 0;

  mean_tree_4x4 dut (.*);

  task automatic check();
    int unsigned want = 0;
    for (int i = 0; i < 16; i++) want += pix[i];
    #1;
    checks++;
    if (sum != 12'(want)) begin
      failures++;
      $display("FAIL got %0d want %0d", sum, want);
    end
  endtask

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    foreach (pix[i]) pix[i] = 8'd0;
    check();
    foreach (pix[i]) pix[i] = 8'd255;
    check();
    for (int k = 0; k < 16; k++) begin
      foreach (pix[i]) pix[i] = (i == k) ? 8'(k + 100) : 8'd0;
      check();
    end
    for (int t = 0; t < 3000; t++) begin
      foreach (pix[i]) pix[i] = 8'($urandom);
      check();
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
