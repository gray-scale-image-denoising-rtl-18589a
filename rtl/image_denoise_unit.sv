// image_denoise_unit: mean filter over a 4x4 or 5x5 window.
// Both reversible adder trees see the window every cycle: the 5x5 tree the whole
// 5x5 array, the 4x4 tree its lower-right 4x4 part (rows 1..4, columns 1..4,
// i.e. the most recent rows and columns). win5 picks which sum is used.
// Stage 1 registers the selected sum and the mode; stage 2 divides by the pixel
// count: a shift by 4 for 16 pixels, and floor(sum*5243/2^17) = floor(sum/25)
// for 25 pixels (exact over the whole 0..6375 range). Result = floor of the mean.
// Timing: one window per cycle, out_valid/out_pix two cycles after in_valid.
// The adder trees follow the document; the division, the rounding (floor) and the
// two-stage pipeline are this design's choices.
module image_denoise_unit
  import denoise_pkg::*;
(
  input  logic clk,
  input  logic rst_n,
  input  logic in_valid,
  input  logic win5,
  input  win_t win,
  output logic out_valid,
  output pix_t out_pix
);
  pix_t        p25 [25];
  pix_t        p16 [16];
  logic [12:0] sum25;
  logic [11:0] sum16;

  always_comb begin
    for (int r = 0; r < 5; r++)
      for (int c = 0; c < 5; c++)
        p25[r*5+c] = win[r][c];
    for (int r = 0; r < 4; r++)
      for (int c = 0; c < 4; c++)
        p16[r*4+c] = win[r+1][c+1];
  end

  mean_tree_5x5 u_tree5 (.pix(p25), .sum(sum25));
  mean_tree_4x4 u_tree4 (.pix(p16), .sum(sum16));

  // stage 1: selected sum
  logic        v1, mode1;
  logic [12:0] sum1;
  always_ff @(posedge clk) begin
    if (!rst_n) begin
      v1    <= 1'b0;
      mode1 <= 1'b0;
      sum1  <= '0;
    end else begin
      v1    <= in_valid;
      mode1 <= win5;
      sum1  <= win5 ? sum25 : {1'b0, sum16};
    end
  end

  // stage 2: divide by the window's pixel count
  logic [12+RECIP25_SH:0] prod;
  pix_t                   mean;
  always_comb begin
    prod = sum1 * (12+RECIP25_SH+1)'(RECIP25);
    if (mode1) mean = pix_t'(prod >> RECIP25_SH);
    else       mean = pix_t'(sum1 >> 4);
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      out_valid <= 1'b0;
      out_pix   <= '0;
    end else begin
      out_valid <= v1;
      out_pix   <= mean;
    end
  end
endmodule
