// mean_tree_5x5: sum of the 25 pixels of a 5x5 window, built only from reversible
// Peres-gate ripple-carry adders.
//   level 1: twelve 8-bit adders  (pixels 0..23 in pairs)      -> 9-bit sums
//   level 2: six 9-bit adders                                  -> 10-bit sums
//   level 3: three 10-bit adders                               -> 11-bit sums
//   level 4: two 11-bit adders: (sum3[0] + sum3[1]) and
//            (sum3[2] + pixel 24 zero-extended)                -> 12-bit sums
//   level 5: one 12-bit adder                                  -> 13-bit total
// Gate count 12*16 + 6*18 + 3*20 + 2*22 + 24 = 428. Combinational; the caller
// registers the result. The garbage outputs of the adders are not used.
module mean_tree_5x5
  import denoise_pkg::*;
(
  input  pix_t        pix [25],
  output logic [12:0] sum
);
  logic [8:0]  s1 [12];
  logic [9:0]  s2 [6];
  logic [10:0] s3 [3];
  logic [11:0] s4 [2];

  for (genvar i = 0; i < 12; i++) begin : g_l1
    rev_rca #(.N(8)) u_add (.a(pix[2*i]), .b(pix[2*i+1]), .s(s1[i]), .garbage());
  end
  for (genvar i = 0; i < 6; i++) begin : g_l2
    rev_rca #(.N(9)) u_add (.a(s1[2*i]), .b(s1[2*i+1]), .s(s2[i]), .garbage());
  end
  for (genvar i = 0; i < 3; i++) begin : g_l3
    rev_rca #(.N(10)) u_add (.a(s2[2*i]), .b(s2[2*i+1]), .s(s3[i]), .garbage());
  end
  rev_rca #(.N(11)) u_l4a (.a(s3[0]), .b(s3[1]), .s(s4[0]), .garbage());
  rev_rca #(.N(11)) u_l4b (.a(s3[2]), .b({3'b000, pix[24]}), .s(s4[1]), .garbage());
  rev_rca #(.N(12)) u_l5  (.a(s4[0]), .b(s4[1]), .s(sum), .garbage());
endmodule
