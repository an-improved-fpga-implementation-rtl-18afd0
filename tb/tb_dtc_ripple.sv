// tb_dtc_ripple: torque ripple against sampling period, the main claim of the
// design: sampling the DTC loop every 5 us keeps the torque within its
// hysteresis band, where the 25 us and 50 us periods of processor-based
// controllers (40 kHz and 20 kHz) let it overshoot.
//
// Three copies of dtc_top run side by side, each closing the loop through its
// own im_plant_model (model step 0.5 us per clock):
//   g=0: strobe every 10 clocks  (5 us),  default TS and LPF_K
//   g=1: strobe every 50 clocks  (25 us), TS = 3355, LPF_K = 4193780
//   g=2: strobe every 100 clocks (50 us), TS = 6711, LPF_K = 4193255
// (TS = Ts*2^27, LPF_K = (1 - 5 rad/s * Ts)*2^22.) References: 0.8 Wb with a
// 0.00446 Wb band, 4 Nm with a 0.7 Nm band. After 15 ms of settling, the true
// model torque and flux are sampled on every clock until 40 ms.
//
// Checks: the RMS torque ripple and the RMS flux error fall strictly as the
// sampling period shrinks; at 5 us the true torque stays within the band plus
// 0.25 Nm and the RMS torque error is below half the band; every copy made
// its flux reach the reference.
module tb_dtc_ripple;
  import dtc_pkg::*;

  localparam int  NCYC  = 80000;          // 40 ms of 0.5 us clocks
  localparam int  START = 30000;          // 15 ms
  localparam int  SP[3]     = '{10, 50, 100};
  localparam logic signed [27:0] TSC[3] = '{28'd671, 28'd3355, 28'd6711};
  localparam logic signed [22:0] KC[3]  = '{23'd4194199, 23'd4193780, 23'd4193255};

  logic clk = 0, rst_n = 0;
  int   cyc = 0;
  int checks = 0, failures = 0;
  always #5 clk = ~clk;
  always @(posedge clk) cyc <= cyc + 1;

  real sq_te[3], sq_fl[3], max_te[3];
  int  n_meas[3], n_rev[3];

  for (genvar g = 0; g < 3; g++) begin : cfg
    logic      sample_en = 0;
    int        cnt = 0;
    cur_ph_t   ia, ib;
    logic      sa, sb, sc, flux_stat;
    torque_t   te;
    flux_mag_t flux_s;
    sector_t   sector;
    flux_t     phi_alpha, phi_beta;
    tstat_e    t_stat;
    real       te_true, flux_true;

    dtc_top #(.TS(TSC[g]), .LPF_K(KC[g])) dut (
      .clk(clk), .rst_n(rst_n), .sample_en(sample_en),
      .ia(ia), .ib(ib), .vdc(12'd540), .rs(10'd176), .pole(3'd2),
      .te_ref(26'd4194304), .flux_ref(17'd6554), .hb_te(26'd734003), .hb_flux(17'd37),
      .sa(sa), .sb(sb), .sc(sc), .te(te), .flux_s(flux_s), .sector(sector),
      .phi_alpha(phi_alpha), .phi_beta(phi_beta), .t_stat(t_stat), .flux_stat(flux_stat));

    im_plant_model #(.DT(0.5e-6)) plant (
      .clk(clk), .sa(sa), .sb(sb), .sc(sc), .ia(ia), .ib(ib),
      .te_true(te_true), .flux_true(flux_true));

    always @(negedge clk) begin
      cnt       <= (cnt == SP[g] - 1) ? 0 : cnt + 1;
      sample_en <= rst_n && (cnt == SP[g] - 1);
    end

    always @(posedge clk) begin
      if (cyc >= START) begin
        real d;
        d = te_true - 4.0;
        sq_te[g] += d * d;
        if (d > max_te[g]) max_te[g] = d;
        if (-d > max_te[g]) max_te[g] = -d;
        sq_fl[g] += (flux_true - 0.8) * (flux_true - 0.8);
        n_meas[g]++;
        if (sample_en && t_stat == T_DEC) n_rev[g]++;
      end
    end
  end

  initial begin
    real rms_te[3], rms_fl[3];
    foreach (sq_te[g]) begin sq_te[g] = 0; sq_fl[g] = 0; max_te[g] = 0; n_meas[g] = 0; n_rev[g] = 0; end
    repeat (4) @(negedge clk);
    rst_n = 1;
    wait (cyc >= NCYC);
    foreach (rms_te[g]) begin
      rms_te[g] = $sqrt(sq_te[g] / real'(n_meas[g]));
      rms_fl[g] = $sqrt(sq_fl[g] / real'(n_meas[g]));
      $display("Ts=%0d us: torque rms error %f Nm, peak %f Nm, flux rms error %f Wb, reverse-vector periods %0d",
               SP[g] / 2, rms_te[g], max_te[g], rms_fl[g], n_rev[g]);
      checks++;
      if (n_meas[g] == 0 || rms_fl[g] > 0.05) begin failures++; $display("FAIL Ts=%0d us: flux not regulated", SP[g] / 2); end
    end
    checks += 4;
    if (!(rms_te[0] < rms_te[1] && rms_te[1] < rms_te[2])) begin failures++; $display("FAIL torque ripple does not fall with the sampling period"); end
    if (!(rms_fl[0] < rms_fl[1] && rms_fl[1] < rms_fl[2])) begin failures++; $display("FAIL flux error does not fall with the sampling period"); end
    if (max_te[0] > 0.35 + 0.25) begin failures++; $display("FAIL 5 us: torque left the band by more than 0.25 Nm"); end
    if (rms_te[0] > 0.35) begin failures++; $display("FAIL 5 us: rms torque error above half the band"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (NCYC + 1000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
