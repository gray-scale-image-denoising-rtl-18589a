// frame_ram_tb: random writes and reads on both read ports of a small frame
// memory, compared with a reference array. Reads return the word one cycle
// later; a read of the address written in the same cycle returns the old word.
`timescale 1ns/1ps
module frame_ram_tb;
  localparam int DEPTH = 64;
  logic clk = 0, we = 0;
  logic [5:0] waddr = '0, raddr_a = '0, raddr_b = '0;
  logic [7:0] wdata = '0, rdata_a, rdata_b;
  logic [7:0] ref_mem [DEPTH];
  int checks = 0, failures = 0, same_addr = 0;

  frame_ram #(.DEPTH(DEPTH), .PIX_W(8)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [7:0] ea, eb;
    // fill
    for (int i = 0; i < DEPTH; i++) begin
      @(negedge clk);
      we = 1; waddr = 6'(i); wdata = 8'($urandom); ref_mem[i] = wdata;
    end
    for (int t = 0; t < 3000; t++) begin
      @(negedge clk);
      we = 1'($urandom); waddr = 6'($urandom); wdata = 8'($urandom);
      raddr_a = 6'($urandom); raddr_b = (t % 7 == 0) ? waddr : 6'($urandom);
      ea = ref_mem[raddr_a]; eb = ref_mem[raddr_b];   // values before this write
      if (we && raddr_b == waddr) same_addr++;
      @(posedge clk);
      if (we) ref_mem[waddr] = wdata;
      #1;
      checks += 2;
      if (rdata_a !== ea) begin failures++; $display("FAIL port a addr %0d got %h want %h", raddr_a, rdata_a, ea); end
      if (rdata_b !== eb) begin failures++; $display("FAIL port b addr %0d got %h want %h", raddr_b, rdata_b, eb); end
    end
    checks++;
    if (same_addr == 0) begin failures++; $display("FAIL read-during-write never exercised"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
