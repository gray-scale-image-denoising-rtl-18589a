// peres_gate_tb: exhaustive test of the Peres gate. All 8 input patterns are
// applied and X, Y, Z compared with the gate's equations; the 8 output patterns
// must also all differ (the mapping is reversible).
`timescale 1ns/1ps
module peres_gate_tb;
  logic m, n, o, x, y, z;
  int checks = 0, failures = 0;
  logic [7:0] seen;

  peres_gate dut (.*);

  initial begin
    #1000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    seen = '0;
    for (int i = 0; i < 8; i++) begin
      {m, n, o} = 3'(i);
      #1;
      checks++;
      if (x !== m || y !== (m ^ n) || z !== ((m & n) ^ o)) begin
        failures++;
        $display("FAIL in=%b%b%b out=%b%b%b", m, n, o, x, y, z);
      end
      seen[{x, y, z}] = 1'b1;
    end
    checks++;
    if (seen !== 8'hff) begin
      failures++;
      $display("FAIL mapping not reversible: %b", seen);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
