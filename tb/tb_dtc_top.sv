// tb_dtc_top: closed-loop test of the complete DTC controller at its default
// size.
//
// A real-valued induction machine model closes the loop: the controller's
// switching states and a 540 V dc link give the stator voltage, the model
// integrates stator and rotor flux (stationary frame, rotor held at a fixed
// electrical speed of 300 rad/s) and returns the phase currents, quantised to
// [5.12] and limited to +/-15.9 A as a current ADC would. The machine constants
// (Rs 5.5, Rr 4.45 ohm, Ls = Lr = 0.32 H, Lm = 0.29 H) are test values.
// One sampling period is 10 clock cycles; 8000 periods (40 ms) are run with a
// flux reference of 0.8 Wb (band 0.00446 Wb) and a torque reference of +4 Nm
// that steps to -4 Nm after 25 ms (band 0.7 Nm).
//
// Checks:
//  * every period, torque, flux magnitude, flux components and sector against
//    a real-valued model of the estimator fed with the same currents and
//    switching states, with the outputs two periods behind the inputs;
//  * after the flux has built up (8 ms), the flux magnitude stays within the
//    band plus 0.025 Wb (the droop at the start of each sector), and after
//    15 ms the torque is within 0.65 Nm of its reference in 80 % of periods;
//  * every mechanism is exercised: all three torque comparator states, both
//    flux comparator states, all six sectors, both zero vectors, the reverse
//    (torque-lowering) active vectors and the low-pass leak of the integrator.
module tb_dtc_top;
  import dtc_pkg::*;

  localparam int  NS      = 8000;
  localparam int  SPACING = 10;
  localparam real PI      = 3.14159265358979;

  logic      clk = 0, rst_n = 0, sample_en = 0;
  cur_ph_t   ia, ib;
  vdc_t      vdc;
  rs_t       rs;
  pole_t     pole;
  torque_t   te_ref, hb_te, te;
  flux_mag_t flux_ref, hb_flux, flux_s;
  logic      sa, sb, sc, flux_stat;
  sector_t   sector;
  flux_t     phi_alpha, phi_beta;
  tstat_e    t_stat;
  int checks = 0, failures = 0;
  always #5 clk = ~clk;

  dtc_top dut (
    .clk(clk), .rst_n(rst_n), .sample_en(sample_en),
    .ia(ia), .ib(ib), .vdc(vdc), .rs(rs), .pole(pole),
    .te_ref(te_ref), .flux_ref(flux_ref), .hb_te(hb_te), .hb_flux(hb_flux),
    .sa(sa), .sb(sb), .sc(sc), .te(te), .flux_s(flux_s), .sector(sector),
    .phi_alpha(phi_alpha), .phi_beta(phi_beta), .t_stat(t_stat), .flux_stat(flux_stat));

  function automatic logic close(input real a, input real b, input real tol);
    return (a - b) <= tol && (b - a) <= tol;
  endfunction

  function automatic int sector_of(input real fa, input real fb, output logic near);
    real d, off;
    d = $atan2(fb, fa) * 180.0 / PI + 30.0;
    while (d < 0.0) d += 360.0;
    off = d - 60.0 * $floor(d / 60.0);
    near = (off < 0.5 || off > 59.5);
    return ((int'($floor(d / 60.0)) + 1) % 6) + 1;
  endfunction

  function automatic cur_ph_t quant(input real x);
    if (x > 15.9) x = 15.9;
    if (x < -15.9) x = -15.9;
    return cur_ph_t'($rtoi(x * 4096.0));
  endfunction

  // coverage of the mechanisms
  int n_tinc, n_tzero, n_tdec, n_fup, n_fdown, n_z000, n_z111, n_rev, n_leak;
  int n_sec[8];

  initial begin
    // machine model state
    real msa, msb, mra, mrb, isa, isb, va, vb;
    real ls, lr, lm, rr, rsm, sig, wr, dt;
    // estimator model state
    real fa, fb, pfa, pfb, pia, pib, ialf, ibet, ts, kl;
    real exp_te, exp_fs, tref, t_now, fs_real, te_real;
    int  exp_sec, reg_ok, reg_n;
    logic near;
    sw_t sw_now;

    ls = 0.32; lr = 0.32; lm = 0.29; rr = 4.45; rsm = 5.5; wr = 300.0;
    sig = 1.0 - lm * lm / (ls * lr);
    dt  = 5e-6;
    ts  = 671.0 / 134217728.0;
    kl  = 4194199.0 / 4194304.0;
    msa = 0; msb = 0; mra = 0; mrb = 0; isa = 0; isb = 0;
    fa = 0; fb = 0; pfa = 0; pfb = 0; pia = 0; pib = 0;
    reg_ok = 0; reg_n = 0;

    vdc = 12'd540; rs = 10'd176; pole = 3'd2;
    flux_ref = 17'd6554;          // 0.8 Wb
    hb_flux  = 17'd37;            // 0.00446 Wb
    hb_te    = 26'd734003;        // 0.7 Nm
    te_ref   = 26'd4194304;       // 4 Nm
    ia = '0; ib = '0;
    repeat (4) @(negedge clk);
    rst_n = 1;

    for (int n = 0; n < NS; n++) begin
      t_now = real'(n) * dt;
      tref = (t_now < 25e-3) ? 4.0 : -4.0;
      te_ref = torque_t'($rtoi(tref * 1048576.0));
      // sample the machine currents
      ia = quant(isa);
      ib = quant((-isa + $sqrt(3.0) * isb) / 2.0);
      sw_now = '{sa: sa, sb: sb, sc: sc};
      repeat (SPACING - 1) @(negedge clk);
      sample_en = 1;
      @(negedge clk);
      sample_en = 0;

      // ---- compare the estimator outputs with the model of period n-1
      if (n >= 1) begin
        exp_te = 0.75 * 2.0 * (pib * pfa - pia * pfb);
        exp_fs = $sqrt(pfa * pfa + pfb * pfb);
        exp_sec = sector_of(pfa, pfb, near);
        checks += 2;
        if (!close(real'(te) / 1048576.0, exp_te, 5e-3))
          begin failures++; $display("FAIL n=%0d te %f exp %f", n, real'(te) / 1048576.0, exp_te); end
        if (!close(real'(flux_s) / 8192.0, exp_fs, 3e-4))
          begin failures++; $display("FAIL n=%0d flux %f exp %f", n, real'(flux_s) / 8192.0, exp_fs); end
        if (!near && exp_fs > 1e-3) begin
          checks++;
          if (int'(sector) != exp_sec) begin failures++; $display("FAIL n=%0d sector %0d exp %0d", n, sector, exp_sec); end
        end
      end
      // ---- estimator model of period n
      ialf = real'(ia) / 4096.0;
      ibet = (real'(ia) + 2.0 * real'(ib)) / 4096.0 / $sqrt(3.0);
      va = 540.0 / 3.0 * (2.0 * real'(sw_now.sa) - real'(sw_now.sb) - real'(sw_now.sc));
      vb = 540.0 / $sqrt(3.0) * (real'(sw_now.sb) - real'(sw_now.sc));
      fa = (fa + (va - 5.5 * ialf) * ts) * kl;
      fb = (fb + (vb - 5.5 * ibet) * ts) * kl;
      checks += 2;
      if (!close(real'(phi_alpha) / 134217728.0, fa, 1e-4)) begin failures++; $display("FAIL n=%0d phi_alpha", n); end
      if (!close(real'(phi_beta) / 134217728.0, fb, 1e-4)) begin failures++; $display("FAIL n=%0d phi_beta", n); end
      // the leak pulls a positive flux component down when no voltage acts on it
      if ((fa + (va - 5.5 * ialf) * ts) * (1.0 - kl) > 1e-9) n_leak++;
      pfa = fa; pfb = fb; pia = ialf; pib = ibet;

      // ---- regulation after the flux has built up (skip 2 ms after the step)
      fs_real = real'(flux_s) / 8192.0;
      te_real = real'(te) / 1048576.0;
      if (t_now > 8e-3) begin
        checks++;
        if (!close(fs_real, 0.8, 0.00446 / 2.0 + 0.025))
          begin failures++; $display("FAIL n=%0d flux %f outside band", n, fs_real); end
      end
      if (t_now > 15e-3 && !(t_now > 25e-3 && t_now < 27e-3)) begin
        reg_n++;
        if (close(te_real, tref, 0.35 + 0.3)) reg_ok++;
      end

      // ---- coverage
      case (t_stat)
        T_INC:   n_tinc++;
        T_DEC:   n_tdec++;
        default: n_tzero++;
      endcase
      if (flux_stat) n_fup++; else n_fdown++;
      n_sec[sector]++;
      if ({sa, sb, sc} == 3'b000) n_z000++;
      if ({sa, sb, sc} == 3'b111) n_z111++;
      if (t_stat == T_DEC && {sa, sb, sc} != 3'b000 && {sa, sb, sc} != 3'b111) n_rev++;

      // ---- machine model over this period with the switching state applied
      va = 540.0 / 3.0 * (2.0 * real'(sw_now.sa) - real'(sw_now.sb) - real'(sw_now.sc));
      vb = 540.0 / $sqrt(3.0) * (real'(sw_now.sb) - real'(sw_now.sc));
      for (int k = 0; k < 10; k++) begin
        real dmra, dmrb;
        msa += (va - rsm * isa) * dt / 10.0;
        msb += (vb - rsm * isb) * dt / 10.0;
        dmra = (lm * rr / lr) * isa - (rr / lr) * mra - wr * mrb;
        dmrb = (lm * rr / lr) * isb - (rr / lr) * mrb + wr * mra;
        mra += dmra * dt / 10.0;
        mrb += dmrb * dt / 10.0;
        isa = (msa - lm / lr * mra) / (sig * ls);
        isb = (msb - lm / lr * mrb) / (sig * ls);
      end
    end

    checks++;
    if (reg_ok * 10 < reg_n * 8) begin failures++; $display("FAIL torque regulated in %0d of %0d periods", reg_ok, reg_n); end
    $display("coverage: t_inc=%0d t_zero=%0d t_dec=%0d flux_up=%0d flux_down=%0d zero000=%0d zero111=%0d reverse=%0d leak=%0d torque_ok=%0d/%0d",
             n_tinc, n_tzero, n_tdec, n_fup, n_fdown, n_z000, n_z111, n_rev, n_leak, reg_ok, reg_n);
    $display("sectors: %0d %0d %0d %0d %0d %0d", n_sec[1], n_sec[2], n_sec[3], n_sec[4], n_sec[5], n_sec[6]);
    checks += 9;
    if (n_tinc == 0)  begin failures++; $display("FAIL torque raise never selected"); end
    if (n_tzero == 0) begin failures++; $display("FAIL torque hold never selected"); end
    if (n_tdec == 0)  begin failures++; $display("FAIL torque lower never selected"); end
    if (n_fup == 0)   begin failures++; $display("FAIL flux raise never selected"); end
    if (n_fdown == 0) begin failures++; $display("FAIL flux lower never selected"); end
    if (n_z000 == 0)  begin failures++; $display("FAIL zero vector 000 never used"); end
    if (n_z111 == 0)  begin failures++; $display("FAIL zero vector 111 never used"); end
    if (n_rev == 0)   begin failures++; $display("FAIL reverse vector never used"); end
    if (n_leak == 0)  begin failures++; $display("FAIL integrator leak never acted"); end
    for (int s = 1; s <= 6; s++) begin
      checks++;
      if (n_sec[s] == 0) begin failures++; $display("FAIL sector %0d never reached", s); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (NS * SPACING + 1000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
