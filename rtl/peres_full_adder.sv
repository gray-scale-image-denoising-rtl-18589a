// peres_full_adder: a reversible full adder made of two cascaded Peres gates.
// Gate 1 gets (P, Q, 0) and produces P (garbage GO1), P^Q and PQ. Gate 2 gets
// (P^Q, Rin, PQ) and produces P^Q (garbage GO2), Sum = P^Q^Rin and
// Rout = (P^Q)Rin ^ PQ. One constant input, two garbage outputs, gate count 2.
// Combinational; the garbage outputs are brought out so the circuit keeps as
// many outputs as inputs.
module peres_full_adder (
  input  logic p,
  input  logic q,
  input  logic r_in,
  output logic sum,
  output logic r_out,
  output logic go1,
  output logic go2
);
  logic p_xor_q, p_and_q;

  peres_gate u_pg1 (.m(p),       .n(q),    .o(1'b0),    .x(go1), .y(p_xor_q), .z(p_and_q));
  peres_gate u_pg2 (.m(p_xor_q), .n(r_in), .o(p_and_q), .x(go2), .y(sum),     .z(r_out));
endmodule
