// tb_vab_calc: self-checking test of the alpha-beta stator voltage block.
// For all eight switching states and a set of dc-link voltages it compares the
// outputs with the bit-exact product Vdc*const*k taken at bits 27..6, and, for
// voltages that fit the [10.12] range, with the ideal values
// Vdc/3*(2Sa-Sb-Sc) and Vdc/sqrt(3)*(Sb-Sc) within 3e-3 V (the constants are exact to about 1e-6).
module tb_vab_calc;
  import dtc_pkg::*;

  vdc_t  vdc;
  sw_t   sw;
  volt_t v_alpha, v_beta;
  int checks = 0, failures = 0;
  logic clk = 0;
  always #5 clk = ~clk;

  vab_calc dut (.vdc(vdc), .sw(sw), .v_alpha(v_alpha), .v_beta(v_beta));

  function automatic longint wrap22(input longint x);
    return longint'($signed(22'(x)));
  endfunction

  task automatic check(input int unsigned v, input logic [2:0] s);
    longint ka, kb, ea, eb;
    real    ra, rb;
    vdc = vdc_t'(v);
    sw  = sw_t'(s);
    @(posedge clk);
    ka = 2 * longint'(s[2]) - longint'(s[1]) - longint'(s[0]);
    kb = longint'(s[1]) - longint'(s[0]);
    ea = wrap22((longint'(v) * 87381 * ka) >>> 6);
    eb = wrap22((longint'(v) * 151349 * kb) >>> 6);
    checks += 2;
    if (longint'(v_alpha) != ea) begin failures++; $display("FAIL valpha v=%0d s=%b got %0d exp %0d", v, s, v_alpha, ea); end
    if (longint'(v_beta)  != eb) begin failures++; $display("FAIL vbeta v=%0d s=%b got %0d exp %0d", v, s, v_beta, eb); end
    if (v <= 760) begin
      ra = real'(v) / 3.0 * real'(ka);
      rb = real'(v) / $sqrt(3.0) * real'(kb);
      checks += 2;
      if ((real'(v_alpha) / 4096.0 - ra) > 3e-3 || (ra - real'(v_alpha) / 4096.0) > 3e-3)
        begin failures++; $display("FAIL valpha accuracy v=%0d s=%b", v, s); end
      if ((real'(v_beta) / 4096.0 - rb) > 3e-3 || (rb - real'(v_beta) / 4096.0) > 3e-3)
        begin failures++; $display("FAIL vbeta accuracy v=%0d s=%b", v, s); end
    end
  endtask

  initial begin
    int unsigned vs[6] = '{0, 1, 300, 540, 760, 4095};
    foreach (vs[j])
      for (int s = 0; s < 8; s++) check(vs[j], 3'(s));
    for (int n = 0; n < 500; n++) check($urandom_range(4095), 3'($urandom));
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
