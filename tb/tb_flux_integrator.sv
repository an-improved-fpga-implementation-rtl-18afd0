// tb_flux_integrator: self-checking test of the leaky backward-Euler flux
// integrator. Random voltage/current sequences are applied for many sampling
// periods with irregular strobes; after every strobe the flux is compared with
// a bit-exact integer model of
//   phi = ((phi + ((V - (Rs*I >> 5)) * 671 >> 12)) * 4194199) >> 22
// and with a real-valued model of the same equation within 1e-4 Wb (truncation error accumulated over 6000 steps). Cycles
// without a strobe must leave the flux unchanged. A final phase with V = 0 and
// I = 0 checks that the low-pass leak decays the flux.
module tb_flux_integrator;
  import dtc_pkg::*;

  logic    clk = 0, rst_n = 0, sample_en = 0;
  volt_t   v;
  cur_ab_t cur;
  rs_t     rs;
  flux_t   phi;
  int checks = 0, failures = 0;
  always #5 clk = ~clk;

  flux_integrator dut (.clk(clk), .rst_n(rst_n), .sample_en(sample_en), .v(v), .i(cur), .rs(rs), .phi(phi));

  function automatic longint wrap(input longint x, input int w);
    return (x <<< (64 - w)) >>> (64 - w);
  endfunction

  longint model;
  real    rmodel;

  task automatic step(input longint vv, input longint ii, input int gap);
    longint rsi, emf, inc, sum;
    flux_t  prev;
    v = volt_t'(vv); cur = cur_ab_t'(ii);
    // idle cycles: flux must hold
    prev = phi;
    repeat (gap) @(negedge clk);
    checks++;
    if (phi != prev) begin failures++; $display("FAIL flux changed without strobe"); end
    sample_en = 1;
    @(negedge clk);
    sample_en = 0;
    rsi   = wrap((ii * longint'(rs)) >>> 5, 23);
    emf   = wrap(vv - rsi, 23);
    inc   = wrap((emf * 671) >>> 12, 28);
    sum   = wrap(model + inc, 31);
    model = wrap((sum * 4194199) >>> 22, 31);
    rmodel = (rmodel + (real'(vv) / 4096.0 - real'(rs) / 32.0 * real'(ii) / 4096.0) * 671.0 / 134217728.0)
             * 4194199.0 / 4194304.0;
    #1;
    checks += 2;
    if (longint'(phi) != model) begin failures++; $display("FAIL exact got %0d exp %0d", phi, model); end
    if ((real'(phi) / 134217728.0 - rmodel) > 1e-4 || (rmodel - real'(phi) / 134217728.0) > 1e-4)
      begin failures++; $display("FAIL real got %f exp %f", real'(phi) / 134217728.0, rmodel); end
  endtask

  initial begin
    real th;
    longint peak;
    rs = 10'd176;   // 5.5 ohm
    v = '0; cur = '0;
    model = 0; rmodel = 0.0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    @(negedge clk);
    checks++;
    if (phi != 0) begin failures++; $display("FAIL reset"); end
    // rotating voltage of 200 V at 50 Hz with a small current
    for (int n = 0; n < 3000; n++) begin
      th = 2.0 * 3.14159265 * 50.0 * real'(n) * 5e-6;
      step(longint'($rtoi(200.0 * $cos(th) * 4096.0)), longint'($rtoi(2.0 * $sin(th) * 4096.0)), $urandom_range(3));
    end
    // random inputs and resistance
    for (int n = 0; n < 1000; n++) begin
      rs = 10'($urandom);
      step(longint'($urandom_range(2000000)) - 1000000, longint'($urandom_range(60000)) - 30000, $urandom_range(2));
    end
    // leak: no input, flux must shrink by about 0.999975 per step
    peak = longint'(phi);
    if (peak < 0) peak = -peak;
    for (int n = 0; n < 2000; n++) step(0, 0, 0);
    checks++;
    if (!((longint'(phi) < 0 ? -longint'(phi) : longint'(phi)) < peak)) begin failures++; $display("FAIL leak did not decay"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
