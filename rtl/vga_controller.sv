// vga_controller: shows the filtered gray image on a VGA monitor.
// A pixel tick every DIV clocks drives horizontal and vertical counters with the
// standard 640x480 / 60 Hz timing (800 x 525 ticks per frame, sync pulses of 96
// ticks and 2 lines, both active low; a 25 MHz tick from a 100 MHz clock). The
// frame memory address row*IMG_W+col of the current counter position is held
// for the whole tick, so the synchronous memory's answer is ready on the tick's
// last clock, when the outputs are registered together with the sync signals
// (outputs lag the counters by one tick, consistently). Image pixels outside the
// IMG_W x IMG_H image, or in blanking, are black; the top-left 640x480 part of a
// larger image is shown. Gray is sent as R=G=B = the 4 upper pixel bits, the
// 4-bit-per-colour format of a resistor-DAC VGA adapter.
// The timing numbers, the crop and the colour mapping are this design's choices.
module vga_controller #(
  parameter int unsigned IMG_W    = 1024,
  parameter int unsigned IMG_H    = 1024,
  parameter int unsigned DIV      = 4,
  parameter int unsigned H_ACTIVE = 640,
  parameter int unsigned H_FP     = 16,
  parameter int unsigned H_SYNC   = 96,
  parameter int unsigned H_BP     = 48,
  parameter int unsigned V_ACTIVE = 480,
  parameter int unsigned V_FP     = 10,
  parameter int unsigned V_SYNC   = 2,
  parameter int unsigned V_BP     = 33,
  localparam int unsigned AW      = $clog2(IMG_W*IMG_H)
) (
  input  logic          clk,
  input  logic          rst_n,
  output logic [AW-1:0] raddr,
  input  logic [7:0]    rdata,
  output logic          hsync,
  output logic          vsync,
  output logic [3:0]    r,
  output logic [3:0]    g,
  output logic [3:0]    b,
  output logic          frame_start    // one clock at the first tick of each frame
);
  localparam int unsigned H_TOTAL = H_ACTIVE + H_FP + H_SYNC + H_BP;
  localparam int unsigned V_TOTAL = V_ACTIVE + V_FP + V_SYNC + V_BP;
  localparam int unsigned HW = $clog2(H_TOTAL);
  localparam int unsigned VW = $clog2(V_TOTAL);
  localparam int unsigned DW = (DIV > 1) ? $clog2(DIV) : 1;

  initial assert (DIV >= 2) else $error("vga_controller: DIV must be at least 2");

  logic [DW-1:0] div_cnt;
  logic          tick;
  logic [HW-1:0] h;
  logic [VW-1:0] v;
  logic          in_img, h_act, v_act;

  assign tick   = (div_cnt == DW'(DIV-1));
  assign h_act  = 32'(h) < H_ACTIVE;
  assign v_act  = 32'(v) < V_ACTIVE;
  assign in_img = h_act && v_act && 32'(h) < IMG_W && 32'(v) < IMG_H;
  assign raddr  = in_img ? AW'(32'(v) * IMG_W + 32'(h)) : '0;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      div_cnt     <= '0;
      h           <= '0;
      v           <= '0;
      hsync       <= 1'b1;
      vsync       <= 1'b1;
      r           <= '0;
      g           <= '0;
      b           <= '0;
      frame_start <= 1'b0;
    end else begin
      div_cnt     <= tick ? '0 : div_cnt + 1'b1;
      frame_start <= 1'b0;
      if (tick) begin
        hsync <= !(32'(h) >= H_ACTIVE + H_FP && 32'(h) < H_ACTIVE + H_FP + H_SYNC);
        vsync <= !(32'(v) >= V_ACTIVE + V_FP && 32'(v) < V_ACTIVE + V_FP + V_SYNC);
        r     <= in_img ? rdata[7:4] : 4'h0;
        g     <= in_img ? rdata[7:4] : 4'h0;
        b     <= in_img ? rdata[7:4] : 4'h0;
        frame_start <= (h == '0) && (v == '0);
        if (32'(h) == H_TOTAL - 1) begin
          h <= '0;
          v <= (32'(v) == V_TOTAL - 1) ? '0 : v + 1'b1;
        end else begin
          h <= h + 1'b1;
        end
      end
    end
  end
endmodule
