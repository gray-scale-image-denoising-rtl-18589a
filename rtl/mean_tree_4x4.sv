// mean_tree_4x4: sum of the 16 pixels of a 4x4 window as a balanced tree of
// reversible Peres-gate ripple-carry adders: eight 8-bit, four 9-bit, two 10-bit
// and one 11-bit adder (gate count 8*16 + 4*18 + 2*20 + 22 = 262), giving a
// 12-bit total. Combinational; the garbage outputs of the adders are not used.
module mean_tree_4x4
  import denoise_pkg::*;
(
  input  pix_t        pix [16],
  output logic [11:0] sum
);
  logic [8:0]  s1 [8];
  logic [9:0]  s2 [4];
  logic [10:0] s3 [2];

  for (genvar i = 0; i < 8; i++) begin : g_l1
    rev_rca #(.N(8)) u_add (.a(pix[2*i]), .b(pix[2*i+1]), .s(s1[i]), .garbage());
  end
  for (genvar i = 0; i < 4; i++) begin : g_l2
    rev_rca #(.N(9)) u_add (.a(s1[2*i]), .b(s1[2*i+1]), .s(s2[i]), .garbage());
  end
  for (genvar i = 0; i < 2; i++) begin : g_l3
    rev_rca #(.N(10)) u_add (.a(s2[2*i]), .b(s2[2*i+1]), .s(s3[i]), .garbage());
  end
  rev_rca #(.N(11)) u_l4 (.a(s3[0]), .b(s3[1]), .s(sum), .garbage());
endmodule
