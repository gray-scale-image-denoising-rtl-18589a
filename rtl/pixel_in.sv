// pixel_in: streams a stored frame into the filter.
// A start pulse while idle begins a scan: the read address runs 0 .. IMG_W*IMG_H-1
// in raster order, one address per clock. The memory answers one cycle later, so
// pix_valid/pix follow raddr by one cycle. sof marks the first pixel, last the
// final one; busy is high from start until the last pixel has been delivered.
// Start pulses while busy are ignored. No back-pressure: the filter accepts one
// pixel per clock.
module pixel_in #(
  parameter int unsigned IMG_W = 1024,
  parameter int unsigned IMG_H = 1024,
  localparam int unsigned NPIX = IMG_W*IMG_H,
  localparam int unsigned AW   = $clog2(NPIX)
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          start,
  output logic [AW-1:0] raddr,
  input  logic [7:0]    rdata,
  output logic          pix_valid,
  output logic [7:0]    pix,
  output logic          sof,
  output logic          last,
  output logic          busy
);
  logic scanning;      // raddr is being issued
  logic rd_v, rd_first, rd_last;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      scanning <= 1'b0;
      raddr    <= '0;
      rd_v     <= 1'b0;
      rd_first <= 1'b0;
      rd_last  <= 1'b0;
    end else begin
      rd_v     <= scanning;
      rd_first <= scanning && raddr == '0;
      rd_last  <= scanning && raddr == AW'(NPIX-1);
      if (!scanning && !busy && start) begin
        scanning <= 1'b1;
        raddr    <= '0;
      end else if (scanning) begin
        if (raddr == AW'(NPIX-1)) scanning <= 1'b0;
        else                      raddr    <= raddr + 1'b1;
      end
    end
  end

  assign busy      = scanning | rd_v;
  assign pix_valid = rd_v;
  assign pix       = rdata;
  assign sof       = rd_first;
  assign last      = rd_last;
endmodule
