// pixel_in_tb: scans a 5x4 frame from a memory model (one-cycle read) and checks
// that every pixel comes out once, in raster order, on consecutive clocks, the
// first one 2 clocks after start; sof/last mark the first and last pixel; busy
// spans the scan; a start pulse during a scan is ignored. Two frames are run.
`timescale 1ns/1ps
module pixel_in_tb;
  localparam int W = 5, H = 4, N = W*H;
  logic clk = 0, rst_n = 0, start = 0;
  logic [4:0] raddr;
  logic [7:0] rdata, pix;
  logic pix_valid, sof, last, busy;
  logic [7:0] mem [N];
  int checks = 0, failures = 0, cycle = 0;

  pixel_in #(.IMG_W(W), .IMG_H(H)) dut (.*);

  always #5 clk = ~clk;
  always @(posedge clk) begin
    cycle++;
    rdata <= mem[raddr];
  end

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(logic cond, string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL %s (cycle %0d)", what, cycle); end
  endtask

  initial begin
    int n, t0;
    foreach (mem[i]) mem[i] = 8'($urandom);
    repeat (3) @(negedge clk);
    rst_n = 1;
    for (int f = 0; f < 2; f++) begin
      @(negedge clk);
      check(!busy && !pix_valid, "idle before start");
      start = 1; t0 = cycle;
      @(negedge clk);
      start = 0;
      n = 0;
      while (n < N) begin
        @(negedge clk);
        if (n == 3) start = 1;          // must be ignored
        else        start = 0;
        check(busy, "busy during scan");
        if (pix_valid) begin
          check(pix == mem[n], "pixel value/order");
          check(sof == (n == 0), "sof");
          check(last == (n == N-1), "last");
          if (n == 0) check(cycle - t0 == 2, "first pixel 2 clocks after start");
          n++;
        end else begin
          check(n == 0, "gap in the pixel stream");
        end
      end
      start = 0;
      @(negedge clk);
      check(!busy && !pix_valid, "idle after last pixel");
      foreach (mem[i]) mem[i] = 8'($urandom);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
