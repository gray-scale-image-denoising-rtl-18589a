// vga_controller_tb: small timing (8+2+3+2 ticks per line, 6+1+2+1 lines per
// frame, a tick every 2 clocks) and a 5x4 image, so that the image is cropped on
// neither side and the black surround is visible. The outputs after every tick
// are compared with an independent model of the counters: sync pulse positions,
// the pixel colour R=G=B=pixel[7:4] inside the image, black elsewhere. Two frames
// are checked, and the number of hsync/vsync pulses and of frame_start pulses
// is counted.
`timescale 1ns/1ps
module vga_controller_tb;
  localparam int IW = 5, IH = 4, DIV = 2;
  localparam int HA = 8, HF = 2, HS = 3, HB = 2, HT = HA+HF+HS+HB;
  localparam int VA = 6, VF = 1, VS = 2, VB = 1, VT = VA+VF+VS+VB;
  logic clk = 0, rst_n = 0;
  logic [4:0] raddr;
  logic [7:0] rdata;
  logic hsync, vsync, frame_start;
  logic [3:0] r, g, b;
  logic [7:0] mem [IW*IH];
  int checks = 0, failures = 0, nhs = 0, nvs = 0, nfs = 0, nimg = 0;

  vga_controller #(.IMG_W(IW), .IMG_H(IH), .DIV(DIV),
    .H_ACTIVE(HA), .H_FP(HF), .H_SYNC(HS), .H_BP(HB),
    .V_ACTIVE(VA), .V_FP(VF), .V_SYNC(VS), .V_BP(VB)) dut (.*);

  always #5 clk = ~clk;
  always @(posedge clk) rdata <= mem[raddr];

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic prev_hs = 1, prev_vs = 1;
    foreach (mem[i]) mem[i] = 8'($urandom);
    repeat (3) @(negedge clk);
    rst_n = 1;
    for (int n = 0; n < 2*HT*VT; n++) begin
      int h, v;
      logic ehs, evs, inimg;
      logic [3:0] ec;
      h = n % HT;
      v = (n / HT) % VT;
      repeat (DIV) @(negedge clk);          // the tick of pixel n has happened
      ehs   = !(h >= HA+HF && h < HA+HF+HS);
      evs   = !(v >= VA+VF && v < VA+VF+VS);
      inimg = h < HA && v < VA && h < IW && v < IH;
      ec    = inimg ? mem[v*IW+h][7:4] : 4'h0;
      if (inimg) nimg++;
      checks++;
      if (hsync !== ehs || vsync !== evs || r !== ec || g !== ec || b !== ec) begin
        failures++;
        $display("FAIL n=%0d h=%0d v=%0d: hs=%b vs=%b rgb=%h%h%h want hs=%b vs=%b c=%h",
                 n, h, v, hsync, vsync, r, g, b, ehs, evs, ec);
      end
      if (prev_hs && !hsync) nhs++;
      if (prev_vs && !vsync) nvs++;
      prev_hs = hsync; prev_vs = vsync;
    end
    checks++;
    if (nhs != 2*VT || nvs != 2 || nimg != 2*IW*IH) begin
      failures++;
      $display("FAIL pulse counts: hsync %0d vsync %0d image pixels %0d", nhs, nvs, nimg);
    end
    checks++;
    if (nfs < 2) begin failures++; $display("FAIL frame_start seen %0d times", nfs); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  always @(posedge clk) if (frame_start) nfs++;
endmodule
