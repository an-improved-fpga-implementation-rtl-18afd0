// dtc_pkg: fixed-point types and constants shared by the direct torque control
// (DTC) datapath.
//
// Every quantity is a two's complement fixed-point number written [I.F]: I
// integer bits (sign included) and F fraction bits. The word formats and the
// constants below are those of the published estimator: phase currents
// [5.12], alpha-beta currents [6.12], voltages [10.12], flux components [4.27],
// flux magnitude [4.13] (unsigned) and torque [6.20]. The constants are the
// printed hexadecimal codes: sqrt(3)/3 and 1/3 with 18 fraction bits, the
// sampling time 5 us with 27 fraction bits, the low-pass leak factor
// (1 - wc*Ts) = 0.999975 with 22 fraction bits and sqrt(3) with 14 fraction
// bits for the sector judge. The torque comparator encoding (tstat_e) and the
// switching-state struct are this design's own choices.
package dtc_pkg;

  // ---------------------------------------------------------------- formats
  typedef logic signed [16:0] cur_ph_t;    // phase current Ia, Ib     [5.12]
  typedef logic signed [17:0] cur_ab_t;    // i_alpha, i_beta          [6.12]
  typedef logic        [11:0] vdc_t;       // dc-link voltage, volts   [12.0] unsigned
  typedef logic signed [21:0] volt_t;      // V_alpha, V_beta          [10.12]
  typedef logic        [9:0]  rs_t;        // stator resistance        [5.5] unsigned
  typedef logic signed [30:0] flux_t;      // phi_alpha, phi_beta      [4.27]
  typedef logic        [61:0] radicand_t;  // phi_alpha^2+phi_beta^2   [8.54] unsigned
  typedef logic        [30:0] root_t;      // square root              [4.27] unsigned
  typedef logic        [16:0] flux_mag_t;  // |phi_s| after truncation [4.13] unsigned
  typedef logic signed [25:0] torque_t;    // Te after truncation      [6.20]
  typedef logic        [2:0]  sector_t;    // sector code 1..6 (Table of the sector judge)
  typedef logic        [2:0]  pole_t;      // number of pole pairs

  // ------------------------------------------------------------- constants
  localparam logic signed [18:0] SQRT3_3_Q18  = 19'h24F35;    // sqrt(3)/3 * 2^18 = 151349
  localparam logic signed [18:0] THIRD_Q18    = 19'h15555;    // 1/3 * 2^18       = 87381
  localparam logic signed [27:0] TS_Q27       = 28'h000029F;  // 5 us * 2^27      = 671
  localparam logic signed [22:0] LPF_K_Q22    = 23'h3FFF97;   // (1 - wc*Ts)*2^22 = 4194199
  localparam logic signed [15:0] SQRT3_Q14    = 16'sh6ED9;    // sqrt(3) * 2^14   = 28377
  localparam logic signed [15:0] NEG_SQRT3_Q14 = 16'sh9127;   // -sqrt(3) * 2^14

  // ------------------------------------------------------- control states
  // Three-level torque comparator output.
  typedef enum logic [1:0] {
    T_ZERO = 2'b00,   // hold torque: zero voltage vector
    T_INC  = 2'b01,   // raise torque
    T_DEC  = 2'b11    // lower torque
  } tstat_e;

  // Inverter switching states; 1 connects the phase to the positive rail.
  typedef struct packed {
    logic sa;
    logic sb;
    logic sc;
  } sw_t;

endpackage
