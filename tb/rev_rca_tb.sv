// rev_rca_tb: the reversible ripple-carry adder at every width the filter uses
// (8..12 bits). 8 bits: exhaustive; other widths: corner cases and random
// operands. Each sum is compared with the integer a+b.
`timescale 1ns/1ps
module rev_rca_tb;
  int checks = 0, failures = 0;

  logic [7:0]  a8,  b8;  logic [8:0]  s8;
  logic [8:0]  a9,  b9;  logic [9:0]  s9;
  logic [9:0]  a10, b10; logic [10:0] s10;
  logic [10:0] a11, b11; logic [11:0] s11;
  logic [11:0] a12, b12; logic [12:0] s12;

  rev_rca #(.N(8))  u8  (.a(a8),  .b(b8),  .s(s8),  .garbage());
  rev_rca #(.N(9))  u9  (.a(a9),  .b(b9),  .s(s9),  .garbage());
  rev_rca #(.N(10)) u10 (.a(a10), .b(b10), .s(s10), .garbage());
  rev_rca #(.N(11)) u11 (.a(a11), .b(b11), .s(s11), .garbage());
  rev_rca #(.N(12)) u12 (.a(a12), .b(b12), .s(s12), .garbage());

  task automatic check(int unsigned got, int unsigned want, string what);
    checks++;
    if (got != want) begin
      failures++;
      $display("FAIL %s got %0d want %0d", what, got, want);
    end
  endtask

  initial begin
    #10000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 256; i++)
      for (int j = 0; j < 256; j++) begin
        a8 = 8'(i); b8 = 8'(j);
        #1 check(s8, i + j, "8-bit");
      end
    for (int t = 0; t < 2000; t++) begin
      a9  = (t == 0) ? '1 : 9'($urandom);  b9  = (t == 0) ? '1 : 9'($urandom);
      a10 = (t == 0) ? '1 : 10'($urandom); b10 = (t == 0) ? '1 : 10'($urandom);
      a11 = (t == 0) ? '1 : 11'($urandom); b11 = (t == 0) ? '1 : 11'($urandom);
      a12 = (t == 0) ? '1 : 12'($urandom); b12 = (t == 0) ? '1 : 12'($urandom);
      #1;
      check(s9,  a9  + b9,  "9-bit");
      check(s10, a10 + b10, "10-bit");
      check(s11, a11 + b11, "11-bit");
      check(s12, a12 + b12, "12-bit");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
