// denoise_top: gray-scale image denoiser with a mean filter built from reversible
// (Peres-gate) adders, and a VGA display of the result.
// Data path: input frame memory -> pixel_in (raster scan, 1 pixel/clock) ->
// image_buffer (4 line memories) -> image_window (5x5 registers) ->
// image_denoise_unit (4x4 or 5x5 reversible adder tree, divide) -> output frame
// memory -> vga_controller. A host loads the noisy gray image through load_*,
// pulses start (win5 chooses the 5x5 or 4x4 window for that frame), waits for
// done, and can read the filtered image through rd_addr/rd_data (1-cycle read);
// the VGA output shows the output memory continuously.
// Filtered pixel (r,c) is the floor of the mean of input pixels (r..r+K-1,
// c..c+K-1), for r <= IMG_H-K and c <= IMG_W-K; other output locations are not
// written. A frame takes IMG_W*IMG_H + 5 clocks from start to done.
// The chain of blocks follows the document; the frame memories' ports, the
// start/done handshake, the border handling and the single clock are this
// design's choices.
module denoise_top
  import denoise_pkg::*;
#(
  parameter int unsigned IMG_W   = 1024,
  parameter int unsigned IMG_H   = 1024,
  parameter int unsigned VGA_DIV = 4,
  localparam int unsigned AW     = $clog2(IMG_W*IMG_H)
) (
  input  logic          clk,
  input  logic          rst_n,
  // loading the noisy gray image
  input  logic          load_we,
  input  logic [AW-1:0] load_addr,
  input  pix_t          load_data,
  // control
  input  logic          start,
  input  logic          win5,
  output logic          busy,
  output logic          done,
  // reading the filtered image
  input  logic [AW-1:0] rd_addr,
  output pix_t          rd_data,
  // VGA
  output logic          vga_hsync,
  output logic          vga_vsync,
  output logic [3:0]    vga_r,
  output logic [3:0]    vga_g,
  output logic [3:0]    vga_b
);
  localparam int unsigned XW = $clog2(IMG_W);
  localparam int unsigned YW = $clog2(IMG_H);

  // ---- input frame memory and scanner
  logic [AW-1:0] in_raddr;
  pix_t          in_rdata, in_unused;
  logic          pix_valid, pix_sof, pix_last, scan_busy;
  pix_t          pix;

  frame_ram #(.DEPTH(IMG_W*IMG_H), .PIX_W(PIX_W)) u_in_mem (
    .clk, .we(load_we), .waddr(load_addr), .wdata(load_data),
    .raddr_a(in_raddr), .rdata_a(in_rdata), .raddr_b('0), .rdata_b(in_unused));

  logic start_ok;
  assign start_ok = start && !busy;

  pixel_in #(.IMG_W(IMG_W), .IMG_H(IMG_H)) u_pixel_in (
    .clk, .rst_n, .start(start_ok), .raddr(in_raddr), .rdata(in_rdata),
    .pix_valid, .pix, .sof(pix_sof), .last(pix_last), .busy(scan_busy));

  // window size held for the whole frame
  logic win5_q;
  always_ff @(posedge clk) begin
    if (!rst_n)        win5_q <= 1'b1;
    else if (start_ok) win5_q <= win5;
  end

  // ---- image buffer and window
  logic     col_valid, col_sof;
  win_col_t col;
  always_ff @(posedge clk) begin
    if (!rst_n) col_sof <= 1'b0;
    else        col_sof <= pix_sof;
  end

  image_buffer #(.IMG_W(IMG_W)) u_buffer (
    .clk, .rst_n, .in_valid(pix_valid), .sof(pix_sof), .in_pix(pix),
    .col_valid, .col);

  win_t          win;
  logic          win_valid, last_win;
  logic [YW-1:0] w_row;
  logic [XW-1:0] w_col;

  image_window #(.IMG_W(IMG_W), .IMG_H(IMG_H)) u_window (
    .clk, .rst_n, .col_valid, .sof(col_sof), .col, .win5(win5_q),
    .win, .win_valid, .last_win, .out_row(w_row), .out_col(w_col));

  // ---- mean filter (2-cycle latency); position and end-of-frame follow alongside
  logic dn_valid;
  pix_t dn_pix;
  image_denoise_unit u_denoise (
    .clk, .rst_n, .in_valid(win_valid), .win5(win5_q), .win,
    .out_valid(dn_valid), .out_pix(dn_pix));

  logic [AW-1:0] waddr_d [2];
  logic [1:0]    last_d;
  always_ff @(posedge clk) begin
    if (!rst_n) begin
      last_d     <= '0;
      waddr_d[0] <= '0;
      waddr_d[1] <= '0;
    end else begin
      waddr_d[0] <= AW'(32'(w_row) * IMG_W + 32'(w_col));
      waddr_d[1] <= waddr_d[0];
      last_d     <= {last_d[0], last_win};
    end
  end

  // frame in progress from start to the last written pixel
  logic running;
  always_ff @(posedge clk) begin
    if (!rst_n) begin
      running <= 1'b0;
      done    <= 1'b0;
    end else begin
      done <= last_d[1];
      if (start_ok)       running <= 1'b1;
      else if (last_d[1]) running <= 1'b0;
    end
  end
  assign busy = running;

  // rules of the start/done handshake: a scan only runs inside a busy frame, and
  // the frame cannot end before the scanner has delivered its last pixel
  a_scan_in_frame: assert property (@(posedge clk) disable iff (!rst_n) scan_busy |-> running);
  a_done_after_last: assert property (@(posedge clk) disable iff (!rst_n) done |-> !scan_busy && !pix_last);

  // ---- output frame memory and display
  logic [AW-1:0] vga_raddr;
  pix_t          vga_rdata;
  logic          vga_frame_start;

  frame_ram #(.DEPTH(IMG_W*IMG_H), .PIX_W(PIX_W)) u_out_mem (
    .clk, .we(dn_valid), .waddr(waddr_d[1]), .wdata(dn_pix),
    .raddr_a(vga_raddr), .rdata_a(vga_rdata), .raddr_b(rd_addr), .rdata_b(rd_data));

  vga_controller #(.IMG_W(IMG_W), .IMG_H(IMG_H), .DIV(VGA_DIV)) u_vga (
    .clk, .rst_n, .raddr(vga_raddr), .rdata(vga_rdata),
    .hsync(vga_hsync), .vsync(vga_vsync), .r(vga_r), .g(vga_g), .b(vga_b),
    .frame_start(vga_frame_start));
endmodule
