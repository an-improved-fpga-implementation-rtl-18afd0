// tb_torque_calc: self-checking test of the torque calculation.
// Random currents and fluxes for 1, 2 and 3 pole pairs are checked bit-exactly
// against ((i_beta*phi_alpha - i_alpha*phi_beta) * 3P) >> 21 and against the
// real value 3/4*P*(i_beta*phi_alpha - i_alpha*phi_beta) within 3 LSB of [6.20].
module tb_torque_calc;
  import dtc_pkg::*;

  cur_ab_t ial, ibe;
  flux_t   pal, pbe;
  pole_t   pole;
  torque_t te;
  int checks = 0, failures = 0;
  logic clk = 0;
  always #5 clk = ~clk;

  torque_calc dut (.i_alpha(ial), .i_beta(ibe), .phi_alpha(pal), .phi_beta(pbe), .pole(pole), .te(te));

  task automatic check(input longint ia, input longint ib, input longint fa, input longint fb, input int p);
    longint e;
    real    r, got;
    ial = cur_ab_t'(ia); ibe = cur_ab_t'(ib);
    pal = flux_t'(fa);   pbe = flux_t'(fb);
    pole = pole_t'(p);
    @(posedge clk);
    e = longint'($signed(26'(((ib * fa - ia * fb) * (3 * p)) >>> 21)));
    r = 0.75 * real'(p) * (real'(ib) / 4096.0 * real'(fa) / 134217728.0
                          - real'(ia) / 4096.0 * real'(fb) / 134217728.0);
    got = real'(te) / 1048576.0;
    checks += 2;
    if (longint'(te) != e) begin failures++; $display("FAIL exact got %0d exp %0d", te, e); end
    if ((got - r) > 3.0 / 1048576.0 || (r - got) > 3.0 / 1048576.0)
      begin failures++; $display("FAIL accuracy got %f exp %f", got, r); end
  endtask

  initial begin
    check(0, 0, 0, 0, 2);
    check(0, 4096, 134217728, 0, 2);            // 1 A x 1 Wb, P=2 -> 1.5 Nm
    check(4096, 0, 0, 134217728, 2);            // -1.5 Nm
    for (int n = 0; n < 2000; n++)
      check($urandom_range(32767) - 16384, $urandom_range(32767) - 16384,
            longint'($urandom_range(268435455)) - 134217728,
            longint'($urandom_range(268435455)) - 134217728, $urandom_range(3, 1));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
