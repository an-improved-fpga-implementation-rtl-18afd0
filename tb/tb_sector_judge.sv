// tb_sector_judge: self-checking test of the sector judge.
// Places the flux vector on circles of several radii at angles that stay at
// least 0.5 degree away from sector borders and compares the code with the
// sector expected from the angle: sector 2 covers -30..30 degrees, sector 3
// 30..90, and so on counter-clockwise to sector 1 at 270..330 degrees.
module tb_sector_judge;
  import dtc_pkg::*;

  flux_t   pa, pb;
  sector_t sector;
  int checks = 0, failures = 0;
  int seen[8];
  logic clk = 0;
  always #5 clk = ~clk;

  sector_judge dut (.phi_alpha(pa), .phi_beta(pb), .sector(sector));

  function automatic int expected(input real deg);
    real d;
    d = deg + 30.0;                  // shift so that sector 2 starts at 0
    while (d < 0.0) d += 360.0;
    while (d >= 360.0) d -= 360.0;
    return ((int'($floor(d / 60.0)) + 1) % 6) + 1;
  endfunction

  initial begin
    real pi, rad[4], deg, off;
    pi = 3.14159265358979;
    rad = '{0.9, 0.01, 3.5, 7.9};
    foreach (rad[k])
      for (int n = 0; n < 720; n++) begin
        deg = real'(n) * 0.5 + 0.25;
        off = deg + 30.0 - 60.0 * $floor((deg + 30.0) / 60.0);
        if (off < 0.5 || off > 59.5) continue;
        pa = flux_t'(longint'($rtoi(rad[k] * $cos(deg * pi / 180.0) * 134217728.0)));
        pb = flux_t'(longint'($rtoi(rad[k] * $sin(deg * pi / 180.0) * 134217728.0)));
        @(posedge clk);
        checks++;
        seen[sector]++;
        if (int'(sector) != expected(deg))
          begin failures++; $display("FAIL deg=%f r=%f got %0d exp %0d", deg, rad[k], sector, expected(deg)); end
      end
    for (int s = 1; s <= 6; s++) begin
      checks++;
      if (seen[s] == 0) begin failures++; $display("FAIL sector %0d never produced", s); end
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
