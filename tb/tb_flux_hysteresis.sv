// tb_flux_hysteresis: self-checking test of the two-level flux comparator.
// A scripted sequence of flux values around a 0.9 Wb reference with a band of
// 0.00446 Wb (37 LSB of [4.13]) checks each expected output: reset value 1,
// switch to 0 above ref+hb/2, hold inside the band, switch back to 1 below
// ref-hb/2, and no change on cycles without a sampling strobe.
module tb_flux_hysteresis;
  import dtc_pkg::*;

  logic      clk = 0, rst_n = 0, sample_en = 0;
  flux_mag_t flux_ref, flux_s, hb;
  logic      flux_stat;
  int checks = 0, failures = 0;
  always #5 clk = ~clk;

  flux_hysteresis dut (.clk(clk), .rst_n(rst_n), .sample_en(sample_en),
                       .flux_ref(flux_ref), .flux_s(flux_s), .hb(hb), .flux_stat(flux_stat));

  // Apply flux value "f" offset from the reference, strobe or not, then check.
  task automatic apply(input int off, input logic strobe, input logic exp);
    flux_s = flux_mag_t'(int'(flux_ref) + off);
    sample_en = strobe;
    @(negedge clk);
    sample_en = 0;
    #1;
    checks++;
    if (flux_stat !== exp) begin failures++; $display("FAIL off=%0d strobe=%b got %b exp %b", off, strobe, flux_stat, exp); end
  endtask

  initial begin
    flux_ref = 17'd7373;     // 0.9 Wb
    hb       = 17'd37;       // 0.00446 Wb -> half band 18 LSB
    flux_s   = '0;
    repeat (2) @(negedge clk);
    #1;
    checks++;
    if (flux_stat !== 1'b1) begin failures++; $display("FAIL reset value"); end
    rst_n = 1;
    apply(-100, 1, 1);   // far below: raise
    apply(0, 1, 1);      // inside: hold 1
    apply(18, 1, 1);     // E = -18 = -hb/2: not beyond, hold
    apply(19, 0, 1);     // beyond but no strobe
    apply(19, 1, 0);     // E = -19 < -hb/2: lower
    apply(0, 1, 0);      // hold 0
    apply(-18, 1, 0);    // E = 18 = hb/2: hold
    apply(-19, 1, 1);    // E > hb/2: raise
    apply(17, 1, 1);     // hold
    for (int n = 0; n < 500; n++) begin : rnd
      int  off;
      logic e;
      off = $urandom_range(80) - 40;
      e = (-off > 18) ? 1'b1 : (-off < -18) ? 1'b0 : flux_stat;
      apply(off, 1, e);
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
