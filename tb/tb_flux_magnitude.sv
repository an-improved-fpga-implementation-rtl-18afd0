// tb_flux_magnitude: self-checking test of the squared flux magnitude.
// Compares the radicand with phi_alpha^2 + phi_beta^2 computed on 64-bit
// integers for corner and random flux components.
module tb_flux_magnitude;
  import dtc_pkg::*;

  flux_t     pa, pb;
  radicand_t radicand;
  int checks = 0, failures = 0;
  logic clk = 0;
  always #5 clk = ~clk;

  flux_magnitude dut (.phi_alpha(pa), .phi_beta(pb), .radicand(radicand));

  task automatic check(input longint a, input longint b);
    longint unsigned e;
    pa = flux_t'(a);
    pb = flux_t'(b);
    @(posedge clk);
    e = 64'(a * a) + 64'(b * b);
    checks++;
    if (64'(radicand) != e) begin failures++; $display("FAIL a=%0d b=%0d got %0d exp %0d", a, b, radicand, e); end
  endtask

  initial begin
    check(0, 0);
    check(-(64'sd1 <<< 30), -(64'sd1 <<< 30));
    check((64'sd1 <<< 30) - 1, -(64'sd1 <<< 30));
    check(1, -1);
    check(64'sd1 <<< 27, 0);   // 1 Wb -> 2^54
    for (int n = 0; n < 2000; n++)
      check(longint'($signed(31'($urandom))), longint'($signed(31'($urandom))));
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
