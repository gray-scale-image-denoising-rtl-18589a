// denoise_pkg: types and constants shared by the gray-scale mean-filter denoiser.
// Pixels are 8-bit gray values. The filter window is held as a 5x5 array of pixels,
// row 0 / column 0 being the oldest (top-left) pixel; the 4x4 mode uses rows and
// columns 1..4 of the same array. The 8-bit pixel width follows the 8-bit adders
// that take the pixels in the adder tree; everything else here is this design's choice.
package denoise_pkg;
  localparam int unsigned PIX_W = 8;   // gray pixel width
  localparam int unsigned WMAX  = 5;   // largest window side

  typedef logic [PIX_W-1:0] pix_t;
  typedef pix_t win_col_t [WMAX];          // one column of the window, [0] = top row
  typedef pix_t win_t     [WMAX][WMAX];    // [row][col], [0][0] = top-left

  // Division of a 5x5 sum by 25: floor(s*RECIP25 / 2^RECIP25_SH), exact for s < 43690
  // (error term 3*s/2^17 stays below 1); the largest 5x5 sum is 25*255 = 6375.
  localparam int unsigned RECIP25    = 5243;
  localparam int unsigned RECIP25_SH = 17;
endpackage
