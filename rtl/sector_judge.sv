// sector_judge: 60-degree sector of the stator flux vector without angles.
//
// Three conditions select the sector: the sign of phi_alpha and the two
// comparisons phi_alpha > sqrt(3)*phi_beta and phi_alpha > -sqrt(3)*phi_beta.
// sqrt(3) and -sqrt(3) are the 16-bit constants 16'h6ED9 and 16'h9127 with 14
// fraction bits; phi_alpha is shifted left by 14 bits so the comparisons are
// done on 47-bit integers. The decoding follows the published Karnaugh map:
//
//   a=phi_a>0  b=phi_a>sqrt3*phi_b  c=phi_a>-sqrt3*phi_b   sector
//        0            0                   0                 101 (5)
//        0            1                   0                 110 (6)
//        0            0                   1                 100 (4)
//        1            1                   0                 001 (1)
//        1            0                   1                 011 (3)
//        1            1                   1                 010 (2)
//
// The two remaining input combinations cannot occur; they give 000 here. So
// sector 2 spans -30..+30 degrees and the numbering rises counter-clockwise.
// Purely combinational.
module sector_judge
  import dtc_pkg::*;
(
  input  flux_t   phi_alpha,  // [4.27]
  input  flux_t   phi_beta,   // [4.27]
  output sector_t sector
);

  logic signed [46:0] pos_q41;    // sqrt(3)*phi_beta  [6.41]
  logic signed [46:0] neg_q41;    // -sqrt(3)*phi_beta
  logic signed [46:0] alpha_q41;  // phi_alpha aligned to the products
  logic a, b, c;

  always_comb begin
    pos_q41   = 47'(phi_beta) * 47'(SQRT3_Q14);
    neg_q41   = 47'(phi_beta) * 47'(NEG_SQRT3_Q14);
    alpha_q41 = 47'(phi_alpha) <<< 14;
    a = (phi_alpha > 0);
    b = (alpha_q41 > pos_q41);
    c = (alpha_q41 > neg_q41);
    unique case ({a, b, c})
      3'b000:  sector = 3'b101;
      3'b010:  sector = 3'b110;
      3'b001:  sector = 3'b100;
      3'b110:  sector = 3'b001;
      3'b101:  sector = 3'b011;
      3'b111:  sector = 3'b010;
      default: sector = 3'b000;   // 011 and 100: geometrically impossible
    endcase
  end

endmodule
