// flux_magnitude: squared stator flux magnitude phi_alpha^2 + phi_beta^2.
//
// Two 31x31 signed multipliers square the [4.27] flux components into 62-bit
// [8.54] products, which are added into the 62-bit unsigned radicand of the
// square root. The sum cannot overflow: each square is below 2^60. Widths
// follow the published design. Purely combinational.
module flux_magnitude
  import dtc_pkg::*;
(
  input  flux_t     phi_alpha,  // [4.27]
  input  flux_t     phi_beta,   // [4.27]
  output radicand_t radicand    // [8.54], unsigned
);

  logic signed [61:0] sq_a;
  logic signed [61:0] sq_b;

  always_comb begin
    sq_a     = 62'(phi_alpha) * 62'(phi_alpha);
    sq_b     = 62'(phi_beta) * 62'(phi_beta);
    radicand = radicand_t'(sq_a) + radicand_t'(sq_b);
  end

endmodule
