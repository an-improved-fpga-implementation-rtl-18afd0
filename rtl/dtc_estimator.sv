// dtc_estimator: two-stage pipelined stator flux and torque estimator.
//
// Stage 1 (combinational into the first register rank): the Clarke transform
// of Ia, Ib (iab_calc), the stator voltage from Sa, Sb, Sc and Vdc (vab_calc)
// and, in the same period, the leaky backward-Euler flux integration
// (flux_integrator, one per axis). The first rank holds i_alpha, i_beta and the
// two flux components, so that currents and fluxes of one sample stay aligned.
// Stage 2 (combinational into the output rank): the squared magnitude
// (flux_magnitude), its nonrestoring square root truncated from [4.27] to
// [4.13], the torque (torque_calc) and the flux sector (sector_judge).
//
// Timing: every register loads on a clock edge where sample_en is high (one
// strobe per 5 us sampling period, 200 kHz). Inputs applied during sampling
// period n appear on te, flux_s and sector after the second strobe, i.e. a
// latency of two sampling periods (10 us). TS and LPF_K must match the strobe
// spacing; their defaults are the published 5 us codes. The merge of current/voltage
// calculation and flux integration into one stage follows the published
// design; registering the sector together with torque and flux is this
// design's choice.
module dtc_estimator
  import dtc_pkg::*;
#(
  parameter logic signed [27:0] TS    = TS_Q27,     // sampling time * 2^27
  parameter logic signed [22:0] LPF_K = LPF_K_Q22   // (1 - wc*Ts) * 2^22
) (
  input  logic      clk,
  input  logic      rst_n,      // synchronous, clears all registers
  input  logic      sample_en,  // sampling strobe
  input  cur_ph_t   ia,         // [5.12]
  input  cur_ph_t   ib,         // [5.12]
  input  vdc_t      vdc,        // volts
  input  sw_t       sw,         // inverter switching states
  input  rs_t       rs,         // stator resistance [5.5]
  input  pole_t     pole,       // pole pairs
  output torque_t   te,         // [6.20]
  output flux_mag_t flux_s,     // [4.13]
  output sector_t   sector,
  output flux_t     phi_alpha,  // stage-1 flux register [4.27]
  output flux_t     phi_beta    // [4.27]
);

  // ---------------------------------------------------------------- stage 1
  cur_ab_t i_alpha_c, i_beta_c;
  volt_t   v_alpha, v_beta;

  iab_calc u_iab (.ia(ia), .ib(ib), .i_alpha(i_alpha_c), .i_beta(i_beta_c));
  vab_calc u_vab (.vdc(vdc), .sw(sw), .v_alpha(v_alpha), .v_beta(v_beta));

  flux_integrator #(.TS(TS), .LPF_K(LPF_K)) u_int_alpha (
    .clk(clk), .rst_n(rst_n), .sample_en(sample_en),
    .v(v_alpha), .i(i_alpha_c), .rs(rs), .phi(phi_alpha));
  flux_integrator #(.TS(TS), .LPF_K(LPF_K)) u_int_beta (
    .clk(clk), .rst_n(rst_n), .sample_en(sample_en),
    .v(v_beta), .i(i_beta_c), .rs(rs), .phi(phi_beta));

  cur_ab_t i_alpha_r, i_beta_r;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      i_alpha_r <= '0;
      i_beta_r  <= '0;
    end else if (sample_en) begin
      i_alpha_r <= i_alpha_c;
      i_beta_r  <= i_beta_c;
    end
  end

  // ---------------------------------------------------------------- stage 2
  radicand_t radicand;
  root_t     root;
  torque_t   te_c;
  sector_t   sector_c;

  flux_magnitude u_mag (.phi_alpha(phi_alpha), .phi_beta(phi_beta), .radicand(radicand));
  sqrt_nonrestoring #(.RW(62)) u_sqrt (.d(radicand), .q(root));
  torque_calc u_torque (
    .i_alpha(i_alpha_r), .i_beta(i_beta_r),
    .phi_alpha(phi_alpha), .phi_beta(phi_beta),
    .pole(pole), .te(te_c));
  sector_judge u_sector (.phi_alpha(phi_alpha), .phi_beta(phi_beta), .sector(sector_c));

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      te     <= '0;
      flux_s <= '0;
      sector <= '0;
    end else if (sample_en) begin
      te     <= te_c;
      flux_s <= root[30:14];
      sector <= sector_c;
    end
  end

endmodule
