// vab_calc: stator voltage in the alpha-beta frame from the inverter switching
// states and the dc-link voltage.
//
//   V_alpha = Vdc/3 * (2Sa - Sb - Sc)
//   V_beta  = sqrt(3)/3 * Vdc * (Sb - Sc)
//
// Vdc is a 12-bit unsigned integer (volts). It is multiplied by the constants
// 18'h15555 (1/3) and 19'h24F35 (sqrt(3)/3), both with 18 fraction bits, and
// the result by the small signed integers 2Sa-Sb-Sc and Sb-Sc (3 bits each).
// The products carry 18 fraction bits; bits 27..6 are kept, giving 22-bit
// [10.12] outputs. Constants, formats and the kept bit range follow the
// published design. Purely combinational.
module vab_calc
  import dtc_pkg::*;
(
  input  vdc_t  vdc,       // dc-link voltage, volts
  input  sw_t   sw,        // switching states Sa, Sb, Sc
  output volt_t v_alpha,   // [10.12]
  output volt_t v_beta     // [10.12]
);

  logic signed [2:0]  k_alpha;     // 2Sa - Sb - Sc, -2..2
  logic signed [2:0]  k_beta;      // Sb - Sc, -1..1
  logic signed [33:0] vdc3_q18;    // Vdc/3          [16.18]
  logic signed [33:0] vdcr3_q18;   // Vdc*sqrt(3)/3  [16.18]
  logic signed [36:0] pa_q18;      // [19.18]
  logic signed [36:0] pb_q18;      // [19.18]

  always_comb begin
    k_alpha   = 3'(signed'({1'b0, sw.sa, 1'b0})) - 3'(signed'({2'b00, sw.sb})) - 3'(signed'({2'b00, sw.sc}));
    k_beta    = 3'(signed'({2'b00, sw.sb})) - 3'(signed'({2'b00, sw.sc}));
    vdc3_q18  = 34'(signed'({1'b0, vdc})) * 34'(THIRD_Q18);
    vdcr3_q18 = 34'(signed'({1'b0, vdc})) * 34'(SQRT3_3_Q18);
    pa_q18    = 37'(vdc3_q18) * 37'(k_alpha);
    pb_q18    = 37'(vdcr3_q18) * 37'(k_beta);
    v_alpha   = pa_q18[27:6];
    v_beta    = pb_q18[27:6];
  end

endmodule
