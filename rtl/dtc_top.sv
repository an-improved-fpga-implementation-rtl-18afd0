// dtc_top: hysteresis-based direct torque control of an induction machine.
//
// The estimator (dtc_estimator) turns the sampled phase currents, the dc-link
// voltage and the switching states it issued into torque, flux magnitude and
// flux sector. A three-level torque comparator and a two-level flux comparator
// (torque_hysteresis, flux_hysteresis) compare them with their references,
// and the switching table turns the two comparator states and the sector into
// the inverter switching states Sa, Sb, Sc, which are fed back to the voltage
// calculation of the estimator. The inverter, the motor, the current ADC and
// any output DAC are outside this module.
//
// Timing: one sampling period is marked by a one-cycle sample_en strobe (5 us,
// 200 kHz in the published design). Estimates leave the estimator two periods
// after their inputs, the comparators register them one period later, and the
// switching table is combinational from the comparator and sector registers,
// so sa/sb/sc change only on sampling strobes. TS and LPF_K set the sampling
// time the flux integrator assumes; they must match the strobe spacing. The comparator registers are
// this design's choice; the loop structure follows the classic DTC scheme.
module dtc_top
  import dtc_pkg::*;
#(
  parameter logic signed [27:0] TS    = TS_Q27,     // sampling time * 2^27 (5 us)
  parameter logic signed [22:0] LPF_K = LPF_K_Q22   // (1 - wc*Ts) * 2^22 (wc = 5 rad/s)
) (
  input  logic      clk,
  input  logic      rst_n,
  input  logic      sample_en,
  input  cur_ph_t   ia,         // phase-a current [5.12]
  input  cur_ph_t   ib,         // phase-b current [5.12]
  input  vdc_t      vdc,        // dc-link voltage, volts
  input  rs_t       rs,         // stator resistance [5.5]
  input  pole_t     pole,       // pole pairs
  input  torque_t   te_ref,     // torque reference [6.20]
  input  flux_mag_t flux_ref,   // flux reference [4.13]
  input  torque_t   hb_te,      // torque band width [6.20]
  input  flux_mag_t hb_flux,    // flux band width [4.13]
  output logic      sa,
  output logic      sb,
  output logic      sc,
  output torque_t   te,         // estimated torque [6.20]
  output flux_mag_t flux_s,     // estimated flux magnitude [4.13]
  output sector_t   sector,     // flux sector 1..6
  output flux_t     phi_alpha,  // [4.27]
  output flux_t     phi_beta,   // [4.27]
  output tstat_e    t_stat,     // torque comparator state
  output logic      flux_stat   // flux comparator state
);

  sw_t sw;

  dtc_estimator #(.TS(TS), .LPF_K(LPF_K)) u_est (
    .clk(clk), .rst_n(rst_n), .sample_en(sample_en),
    .ia(ia), .ib(ib), .vdc(vdc), .sw(sw), .rs(rs), .pole(pole),
    .te(te), .flux_s(flux_s), .sector(sector),
    .phi_alpha(phi_alpha), .phi_beta(phi_beta));

  torque_hysteresis u_thys (
    .clk(clk), .rst_n(rst_n), .sample_en(sample_en),
    .te_ref(te_ref), .te(te), .hb(hb_te), .t_stat(t_stat));

  flux_hysteresis u_fhys (
    .clk(clk), .rst_n(rst_n), .sample_en(sample_en),
    .flux_ref(flux_ref), .flux_s(flux_s), .hb(hb_flux), .flux_stat(flux_stat));

  switching_table u_lut (.t_stat(t_stat), .flux_stat(flux_stat), .sector(sector), .sw(sw));

  assign sa = sw.sa;
  assign sb = sw.sb;
  assign sc = sw.sc;

endmodule
