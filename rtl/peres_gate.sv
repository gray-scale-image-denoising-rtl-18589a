// peres_gate: the 3-input, 3-output reversible Peres gate.
//   X = M, Y = M xor N, Z = (M and N) xor O
// The mapping is a bijection on 3 bits, so the inputs can be recovered from the
// outputs. Purely combinational. The equations are the gate's definition; the
// quantum (controlled-V / CNOT) realisation has no digital counterpart and is
// represented only by this Boolean mapping.
module peres_gate (
  input  logic m,
  input  logic n,
  input  logic o,
  output logic x,
  output logic y,
  output logic z
);
  always_comb begin
    x = m;
    y = m ^ n;
    z = (m & n) ^ o;
  end
endmodule
