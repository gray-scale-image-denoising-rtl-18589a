// frame_ram: frame memory for one gray image (block-RAM style).
// One write port and two independent read ports, all synchronous to clk:
// rdata_x shows the word at raddr_x one cycle after raddr_x is presented.
// A read of the address being written in the same cycle returns the old word.
// The contents are not reset. Used for the input image and for the filtered image
// (the second read port lets the display and a host read the result independently).
module frame_ram #(
  parameter int unsigned DEPTH = 1024*1024,
  parameter int unsigned PIX_W = 8,
  localparam int unsigned AW   = $clog2(DEPTH)
) (
  input  logic             clk,
  input  logic             we,
  input  logic [AW-1:0]    waddr,
  input  logic [PIX_W-1:0] wdata,
  input  logic [AW-1:0]    raddr_a,
  output logic [PIX_W-1:0] rdata_a,
  input  logic [AW-1:0]    raddr_b,
  output logic [PIX_W-1:0] rdata_b
);
  logic [PIX_W-1:0] mem [DEPTH];

  always_ff @(posedge clk) begin
    if (we) mem[waddr] <= wdata;
    rdata_a <= mem[raddr_a];
    rdata_b <= mem[raddr_b];
  end
endmodule
