// switching_table: look-up table that picks the inverter voltage vector from
// the torque comparator, the flux comparator and the flux sector.
//
// Active vectors are numbered V1..V6 counter-clockwise from the alpha axis:
// V1=100, V2=110, V3=010, V4=011, V5=001, V6=101 (Sa Sb Sc). With the sector
// numbering of sector_judge, sector s is centred on vector m = ((s+4) mod 6)+1
// (sector 2 on V1). The classic selection rule then gives
//   raise flux, raise torque : V(m+1)     lower flux, raise torque : V(m+2)
//   raise flux, lower torque : V(m-1)     lower flux, lower torque : V(m-2)
//   hold torque              : zero vector, 000 after V1/V3/V5 and 111 after
//                              V2/V4/V6, so one inverter leg switches.
// A sector code outside 1..6 selects 000. The document names this table but
// does not list it; the rule above is the standard one for hysteresis DTC.
// Purely combinational.
module switching_table
  import dtc_pkg::*;
(
  input  tstat_e  t_stat,
  input  logic    flux_stat,  // 1: raise flux
  input  sector_t sector,
  output sw_t     sw
);

  // Switching state of active vector k (1..6).
  function automatic sw_t vec(input int unsigned k);
    unique case (k)
      1:       return '{sa: 1'b1, sb: 1'b0, sc: 1'b0};
      2:       return '{sa: 1'b1, sb: 1'b1, sc: 1'b0};
      3:       return '{sa: 1'b0, sb: 1'b1, sc: 1'b0};
      4:       return '{sa: 1'b0, sb: 1'b1, sc: 1'b1};
      5:       return '{sa: 1'b0, sb: 1'b0, sc: 1'b1};
      default: return '{sa: 1'b1, sb: 1'b0, sc: 1'b1};
    endcase
  endfunction

  int unsigned m;   // 0..5: centre vector index minus one
  int unsigned k;   // 0..5: selected vector index minus one

  always_comb begin
    m  = (int'(sector) + 4) % 6;
    k  = m;
    sw = '0;
    if (sector >= 3'd1 && sector <= 3'd6) begin
      unique case (t_stat)
        T_INC:   k = flux_stat ? (m + 1) % 6 : (m + 2) % 6;
        T_DEC:   k = flux_stat ? (m + 5) % 6 : (m + 4) % 6;
        default: k = m;
      endcase
      if (t_stat == T_ZERO)
        sw = (m % 2 == 0) ? '{sa: 1'b0, sb: 1'b0, sc: 1'b0} : '{sa: 1'b1, sb: 1'b1, sc: 1'b1};
      else
        sw = vec(k + 1);
    end
  end

endmodule
