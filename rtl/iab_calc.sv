// iab_calc: Clarke transform of the two measured phase currents.
//
//   i_alpha = Ia                          (sign-extended [5.12] -> [6.12])
//   i_beta  = (Ia + 2*Ib) * sqrt(3)/3
//
// Ia + 2*Ib is formed on 19 bits [7.12] so it cannot overflow, multiplied by
// the 19-bit constant 19'h24F35 (sqrt(3)/3 in [1.18]) into a 38-bit [8.30]
// product, and truncated (bits dropped, i.e. rounded toward minus infinity) to
// 18 bits [6.12]. Word formats, constant and truncation follow the published
// design. The adder doubles Ib as the transform equation requires; the
// published block diagram shows the shift on the Ia path instead, which would
// give 2*Ia + Ib, so the equation was taken as authoritative there.
// Purely combinational; the caller registers the result.
module iab_calc
  import dtc_pkg::*;
(
  input  cur_ph_t ia,       // phase-a current [5.12]
  input  cur_ph_t ib,       // phase-b current [5.12]
  output cur_ab_t i_alpha,  // [6.12]
  output cur_ab_t i_beta    // [6.12]
);

  logic signed [18:0] sum_q12;   // Ia + 2*Ib, [7.12]
  logic signed [37:0] prod_q30;  // [8.30]

  always_comb begin
    sum_q12  = 19'(ia) + (19'(ib) <<< 1);
    prod_q30 = 38'(sum_q12) * 38'(SQRT3_3_Q18);
    i_alpha  = 18'(ia);
    i_beta   = prod_q30[35:18];
  end

endmodule
