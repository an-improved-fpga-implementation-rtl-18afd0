// tb_switching_table: self-checking test of the switching look-up table.
// Checks every sector, torque state and flux state geometrically: the angle of
// the chosen voltage vector relative to the centre of the sector must be +60
// degrees (raise flux and torque), +120 (lower flux, raise torque), -60 (raise
// flux, lower torque) or -120 (lower both); a torque hold must give a zero
// vector (000 or 111) that differs from the sector's centre vector in exactly
// one leg. Sector codes 0 and 7 must give 000.
module tb_switching_table;
  import dtc_pkg::*;

  tstat_e  t_stat;
  logic    flux_stat;
  sector_t sector;
  sw_t     sw;
  int checks = 0, failures = 0;
  logic clk = 0;
  always #5 clk = ~clk;

  switching_table dut (.t_stat(t_stat), .flux_stat(flux_stat), .sector(sector), .sw(sw));

  function automatic real vangle(input sw_t s);
    real va, vb;
    va = (2.0 * real'(s.sa) - real'(s.sb) - real'(s.sc)) / 3.0;
    vb = (real'(s.sb) - real'(s.sc)) / $sqrt(3.0);
    return $atan2(vb, va) * 180.0 / 3.14159265358979;
  endfunction

  function automatic real norm(input real d);
    while (d > 180.0) d -= 360.0;
    while (d <= -180.0) d += 360.0;
    return d;
  endfunction

  initial begin
    tstat_e ts[3] = '{T_INC, T_ZERO, T_DEC};
    real centre, want, got;
    sw_t cv;
    for (int s = 0; s < 8; s++)
      foreach (ts[j])
        for (int f = 0; f < 2; f++) begin
          sector = 3'(s); t_stat = ts[j]; flux_stat = f[0];
          @(posedge clk);
          checks++;
          if (s == 0 || s == 7) begin
            if (sw != 3'b000) begin failures++; $display("FAIL invalid sector %0d gave %b", s, sw); end
            continue;
          end
          centre = (s - 2) * 60.0;
          if (ts[j] == T_ZERO) begin
            // centre vector: recompute from angle
            cv.sa = ($cos(centre * 3.14159265358979 / 180.0) > 0.4);
            cv.sb = ($cos((centre - 120.0) * 3.14159265358979 / 180.0) > 0.4);
            cv.sc = ($cos((centre + 120.0) * 3.14159265358979 / 180.0) > 0.4);
            if (!(sw == 3'b000 || sw == 3'b111) || $countones(sw ^ cv) != 1)
              begin failures++; $display("FAIL zero s=%0d got %b centre %b", s, sw, cv); end
          end else begin
            want = (ts[j] == T_INC) ? (f ? 60.0 : 120.0) : (f ? -60.0 : -120.0);
            got  = norm(vangle(sw) - centre);
            if (sw == 3'b000 || sw == 3'b111 || (got - want) > 1.0 || (want - got) > 1.0)
              begin failures++; $display("FAIL s=%0d t=%s f=%0d got %b (%f deg) want %f", s, ts[j].name(), f, sw, got, want); end
          end
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
