// image_buffer: line buffer that turns a raster pixel stream into columns of five
// vertically adjacent pixels.
// One memory of IMG_W words holds the four previous image rows, one 8-bit slot per
// row in each word (slot 0 = four rows above, slot 3 = the row just above). For
// each incoming pixel at column x the word at x is read, its slots are shifted by
// one (the oldest pixel drops out) and the new pixel is written into slot 3: a
// read-modify-write of one address per cycle.
// Output, one cycle after the input: col_valid and col[0..4], col[4] being the
// incoming pixel and col[0] the pixel four rows above it. sof restarts the column
// counter; rows of the previous frame still in the memories are flagged invalid
// by the window stage, not here.
module image_buffer
  import denoise_pkg::*;
#(
  parameter int unsigned IMG_W = 1024,
  localparam int unsigned XW   = $clog2(IMG_W)
) (
  input  logic     clk,
  input  logic     rst_n,
  input  logic     in_valid,
  input  logic     sof,
  input  pix_t     in_pix,
  output logic     col_valid,
  output win_col_t col
);
  localparam int unsigned NLINES = WMAX - 1;

  logic [NLINES*PIX_W-1:0] line [IMG_W];
  logic [NLINES*PIX_W-1:0] rd;
  logic [XW-1:0]  x;
  logic [XW-1:0]  xa;    // column used this cycle

  assign xa = sof ? '0 : x;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      x <= '0;
    end else if (in_valid) begin
      x <= (xa == XW'(IMG_W-1)) ? '0 : xa + 1'b1;
    end
  end

  assign rd = line[xa];

  always_ff @(posedge clk) begin
    if (in_valid) begin
      line[xa] <= {in_pix, rd[NLINES*PIX_W-1:PIX_W]};
      for (int k = 0; k < NLINES; k++) col[k] <= rd[k*PIX_W +: PIX_W];
    end
  end

  always_ff @(posedge clk) begin
    if (!rst_n) col_valid <= 1'b0;
    else        col_valid <= in_valid;
    if (in_valid) col[WMAX-1] <= in_pix;
  end
endmodule
