// tb_torque_hysteresis: self-checking test of the three-level torque
// comparator. A scripted sequence around a 5 Nm reference with a 0.7 Nm band
// checks reset to zero, entry into raise above +hb/2, hold inside the band,
// fall back to zero once the error reaches 0, entry into lower below -hb/2,
// and return to zero when the error climbs back to 0; then random errors are
// checked against the same rules written as a table.
module tb_torque_hysteresis;
  import dtc_pkg::*;

  logic    clk = 0, rst_n = 0, sample_en = 0;
  torque_t te_ref, te, hb;
  tstat_e  t_stat;
  int checks = 0, failures = 0;
  always #5 clk = ~clk;

  torque_hysteresis dut (.clk(clk), .rst_n(rst_n), .sample_en(sample_en),
                         .te_ref(te_ref), .te(te), .hb(hb), .t_stat(t_stat));

  localparam int HALF = 367001;   // 0.35 Nm in [6.20]

  // err = te_ref - te
  task automatic apply(input int err, input tstat_e exp);
    te = torque_t'(int'(te_ref) - err);
    sample_en = 1;
    @(negedge clk);
    sample_en = 0;
    #1;
    checks++;
    if (t_stat !== exp) begin failures++; $display("FAIL err=%0d got %s exp %s", err, t_stat.name(), exp.name()); end
  endtask

  initial begin
    te_ref = 26'd5242880;     // 5 Nm
    hb     = 26'(2 * HALF);   // 0.7 Nm
    te     = '0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    #1;
    checks++;
    if (t_stat !== T_ZERO) begin failures++; $display("FAIL reset"); end
    apply(HALF, T_ZERO);       // at the edge: hold
    apply(HALF + 1, T_INC);
    apply(1000, T_INC);        // inside, positive: hold raise
    apply(0, T_ZERO);          // error reached zero
    apply(-HALF, T_ZERO);
    apply(-HALF - 1, T_DEC);
    apply(-5, T_DEC);
    apply(0, T_ZERO);
    apply(-HALF - 50, T_DEC);
    apply(HALF + 50, T_INC);   // direct reversal
    for (int n = 0; n < 1000; n++) begin : rnd
      int err;
      tstat_e e;
      err = $urandom_range(4 * HALF) - 2 * HALF;
      if (err > HALF)                        e = T_INC;
      else if (err < -HALF)                  e = T_DEC;
      else if (t_stat == T_INC && err <= 0)  e = T_ZERO;
      else if (t_stat == T_DEC && err >= 0)  e = T_ZERO;
      else                                   e = t_stat;
      apply(err, e);
    end
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
