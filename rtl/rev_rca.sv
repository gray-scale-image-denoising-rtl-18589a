// rev_rca: N-bit reversible ripple-carry adder built from N Peres full adders
// (gate count 2N). Carry into bit 0 is the constant 0; the carry out of the top
// bit becomes the MSB of the N+1-bit sum, so two N-bit pixel sums never overflow.
// The 2N garbage outputs of the full adders are brought out on 'garbage'
// ({go2,go1} per bit). Combinational.
module rev_rca #(
  parameter int unsigned N = 8
) (
  input  logic [N-1:0]   a,
  input  logic [N-1:0]   b,
  output logic [N:0]     s,
  output logic [2*N-1:0] garbage
);
  logic [N:0] c;
  assign c[0] = 1'b0;

  for (genvar i = 0; i < N; i++) begin : g_bit
    peres_full_adder u_fa (
      .p(a[i]), .q(b[i]), .r_in(c[i]),
      .sum(s[i]), .r_out(c[i+1]),
      .go1(garbage[2*i]), .go2(garbage[2*i+1])
    );
  end

  assign s[N] = c[N];
endmodule
