// peres_full_adder_tb: exhaustive test of the two-Peres-gate full adder: sum and
// carry against P+Q+Rin, garbage outputs against P and P xor Q.
`timescale 1ns/1ps
module peres_full_adder_tb;
  logic p, q, r_in, sum, r_out, go1, go2;
  int checks = 0, failures = 0;

  peres_full_adder dut (.*);

  initial begin
    #1000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 8; i++) begin
      logic [1:0] expect_sum;
      {p, q, r_in} = 3'(i);
      expect_sum = 2'(p) + 2'(q) + 2'(r_in);
      #1;
      checks++;
      if ({r_out, sum} !== expect_sum || go1 !== p || go2 !== (p ^ q)) begin
        failures++;
        $display("FAIL p=%b q=%b rin=%b -> rout=%b sum=%b go=%b%b", p, q, r_in, r_out, sum, go1, go2);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
