// tb_dtc_estimator: self-checking test of the two-stage flux and torque
// estimator.
// A six-step voltage rotating at 50 Hz (Vdc = 540 V) and 3 A sinusoidal phase
// currents are applied for 5000 sampling periods (25 ms), with a sampling
// strobe every 4 clock cycles. A real-valued model integrates
//   phi(n) = (phi(n-1) + (V(n) - Rs*I(n))*Ts) * (1 - wc*Ts)
// and, one period later, forms |phi(n)|, 3/4*P*(i_beta*phi_alpha -
// i_alpha*phi_beta) and the sector from the angle of phi(n). After every strobe
// the outputs are compared with the model values of the inputs applied two
// strobes earlier, which also checks the two-period latency. The flux
// registers are compared with the model of the previous strobe.
module tb_dtc_estimator;
  import dtc_pkg::*;

  localparam int NS = 5000;
  localparam real PI = 3.14159265358979;

  logic      clk = 0, rst_n = 0, sample_en = 0;
  cur_ph_t   ia, ib;
  vdc_t      vdc;
  sw_t       sw;
  rs_t       rs;
  pole_t     pole;
  torque_t   te;
  flux_mag_t flux_s;
  sector_t   sector;
  flux_t     phi_alpha, phi_beta;
  int checks = 0, failures = 0;
  int seen[8];
  always #5 clk = ~clk;

  dtc_estimator dut (.clk(clk), .rst_n(rst_n), .sample_en(sample_en),
    .ia(ia), .ib(ib), .vdc(vdc), .sw(sw), .rs(rs), .pole(pole),
    .te(te), .flux_s(flux_s), .sector(sector), .phi_alpha(phi_alpha), .phi_beta(phi_beta));

  function automatic int sector_of(input real fa, input real fb, output logic near);
    real d, off;
    d = $atan2(fb, fa) * 180.0 / PI + 30.0;
    while (d < 0.0) d += 360.0;
    off = d - 60.0 * $floor(d / 60.0);
    near = (off < 0.5 || off > 59.5);
    return ((int'($floor(d / 60.0)) + 1) % 6) + 1;
  endfunction

  function automatic logic close(input real a, input real b, input real tol);
    return (a - b) <= tol && (b - a) <= tol;
  endfunction

  initial begin
    real  fa, fb, pfa, pfb, pia, pib, ialf, ibet, va, vb, th, ts, kl;
    real  exp_te, exp_fs;
    int   exp_sec;
    logic near, pnear;
    sw_t  six[6];
    six = '{3'b100, 3'b110, 3'b010, 3'b011, 3'b001, 3'b101};
    ts = 671.0 / 134217728.0;
    kl = 4194199.0 / 4194304.0;
    vdc = 12'd540; rs = 10'd176; pole = 3'd2;
    ia = '0; ib = '0; sw = '0;
    fa = 0.0; fb = 0.0; pia = 0.0; pib = 0.0; pfa = 0.0; pfb = 0.0; pnear = 1'b1;
    repeat (4) @(negedge clk);
    rst_n = 1;
    for (int n = 0; n < NS; n++) begin
      // inputs of period n
      th = 2.0 * PI * 50.0 * real'(n) * 5e-6;
      sw = six[int'($floor(th / (PI / 3.0))) % 6];
      ia = cur_ph_t'($rtoi(3.0 * $cos(th - 1.0) * 4096.0));
      ib = cur_ph_t'($rtoi(3.0 * $cos(th - 1.0 - 2.0 * PI / 3.0) * 4096.0));
      repeat (3) @(negedge clk);
      sample_en = 1;
      @(negedge clk);
      sample_en = 0;
      #1;
      // the strobe loaded stage 2 with period n-1 values and stage 1 with period n
      if (n >= 1) begin
        exp_te = 0.75 * 2.0 * (pib * pfa - pia * pfb);
        exp_fs = $sqrt(pfa * pfa + pfb * pfb);
        exp_sec = sector_of(pfa, pfb, near);
        checks += 2;
        if (!close(real'(te) / 1048576.0, exp_te, 5e-3))
          begin failures++; $display("FAIL n=%0d te %f exp %f", n, real'(te) / 1048576.0, exp_te); end
        if (!close(real'(flux_s) / 8192.0, exp_fs, 3e-4))
          begin failures++; $display("FAIL n=%0d flux %f exp %f", n, real'(flux_s) / 8192.0, exp_fs); end
        if (!near) begin
          checks++;
          seen[sector]++;
          if (int'(sector) != exp_sec) begin failures++; $display("FAIL n=%0d sector %0d exp %0d", n, sector, exp_sec); end
        end
      end
      // model of period n
      ialf = real'(ia) / 4096.0;
      ibet = (real'(ia) + 2.0 * real'(ib)) / 4096.0 / $sqrt(3.0);
      va = 540.0 / 3.0 * (2.0 * real'(sw.sa) - real'(sw.sb) - real'(sw.sc));
      vb = 540.0 / $sqrt(3.0) * (real'(sw.sb) - real'(sw.sc));
      fa = (fa + (va - 5.5 * ialf) * ts) * kl;
      fb = (fb + (vb - 5.5 * ibet) * ts) * kl;
      checks += 2;
      if (!close(real'(phi_alpha) / 134217728.0, fa, 1e-4)) begin failures++; $display("FAIL n=%0d phi_alpha", n); end
      if (!close(real'(phi_beta) / 134217728.0, fb, 1e-4)) begin failures++; $display("FAIL n=%0d phi_beta", n); end
      pfa = fa; pfb = fb; pia = ialf; pib = ibet;
    end
    for (int s = 1; s <= 6; s++) begin
      checks++;
      if (seen[s] == 0) begin failures++; $display("FAIL sector %0d never seen", s); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (NS * 4 + 1000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
