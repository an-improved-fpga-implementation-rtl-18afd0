// torque_calc: electromagnetic torque from stator current and stator flux.
//
//   Te = 3/4 * P * (i_beta*phi_alpha - i_alpha*phi_beta)
//
// The two 18x31 products ([10.39]) are subtracted on 50 bits, the pole-pair
// count P is turned into 3P by a shift-and-add, and the difference times 3P
// is a 55-bit product. Reading that product with 41 fraction bits instead of
// 39 performs the division by 4 for free, giving [14.41]; bits 46..21 are
// kept as the 26-bit [6.20] torque. Formats follow the published design.
// Purely combinational.
module torque_calc
  import dtc_pkg::*;
(
  input  cur_ab_t i_alpha,    // [6.12]
  input  cur_ab_t i_beta,     // [6.12]
  input  flux_t   phi_alpha,  // [4.27]
  input  flux_t   phi_beta,   // [4.27]
  input  pole_t   pole,       // number of pole pairs
  output torque_t te          // [6.20]
);

  logic signed [48:0] p1;       // i_beta*phi_alpha  [10.39]
  logic signed [48:0] p2;       // i_alpha*phi_beta  [10.39]
  logic signed [49:0] diff;     // [11.39]
  logic signed [5:0]  pole3;    // 3P, 0..21
  logic signed [54:0] prod;     // [14.41] after the implicit /4

  always_comb begin
    p1    = 49'(i_beta) * 49'(phi_alpha);
    p2    = 49'(i_alpha) * 49'(phi_beta);
    diff  = 50'(p1) - 50'(p2);
    pole3 = 6'({1'b0, pole, 1'b0}) + 6'({3'b000, pole});
    prod  = 55'(diff) * 55'(pole3);
    te    = prod[46:21];
  end

endmodule
