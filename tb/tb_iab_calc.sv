// tb_iab_calc: self-checking test of the Clarke current transform.
// Drives corner and random phase currents and compares i_alpha with Ia and
// i_beta with floor((Ia + 2*Ib) * 151349 / 2^18), and also with the exact real
// value (Ia + 2*Ib)/sqrt(3) within 2 LSB.
module tb_iab_calc;
  import dtc_pkg::*;

  cur_ph_t ia, ib;
  cur_ab_t i_alpha, i_beta;
  int checks = 0, failures = 0;
  logic clk = 0;
  always #5 clk = ~clk;

  iab_calc dut (.ia(ia), .ib(ib), .i_alpha(i_alpha), .i_beta(i_beta));

  task automatic check(input longint a, input longint b);
    longint exp_b;
    real    ref_b;
    ia = cur_ph_t'(a);
    ib = cur_ph_t'(b);
    @(posedge clk);
    exp_b = ((a + 2 * b) * 151349) >>> 18;
    ref_b = real'(a + 2 * b) / $sqrt(3.0);
    checks += 3;
    if (longint'(i_alpha) != a)     begin failures++; $display("FAIL ialpha a=%0d got %0d", a, i_alpha); end
    if (longint'(i_beta) != exp_b)  begin failures++; $display("FAIL ibeta a=%0d b=%0d got %0d exp %0d", a, b, i_beta, exp_b); end
    if ((real'(i_beta) - ref_b) > 2.0 || (ref_b - real'(i_beta)) > 2.0)
      begin failures++; $display("FAIL ibeta accuracy %0d vs %f", i_beta, ref_b); end
  endtask

  initial begin
    check(0, 0);
    check(-65536, -65536);
    check(65535, 65535);
    check(-65536, 65535);
    check(4096, 0);          // 1 A on phase a
    check(-4096, 4096);
    for (int n = 0; n < 2000; n++)
      check(longint'($signed(17'($urandom))), longint'($signed(17'($urandom))));
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
