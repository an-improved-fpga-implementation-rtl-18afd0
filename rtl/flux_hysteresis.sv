// flux_hysteresis: two-level hysteresis comparator of the stator flux loop.
//
// The error E = flux_ref - flux_s is compared with half the band width hb.
// When E > hb/2 the output goes to 1 (raise the flux), when E < -hb/2 it goes
// to 0 (lower the flux); inside the band the previous output is held. The
// two-level structure and the band are those of classic DTC; the thresholds at
// +/- hb/2, the register and its reset value 1 (build up flux first) are this
// design's choices. The state updates on clock edges where sample_en is high.
module flux_hysteresis
  import dtc_pkg::*;
(
  input  logic      clk,
  input  logic      rst_n,
  input  logic      sample_en,
  input  flux_mag_t flux_ref,   // [4.13]
  input  flux_mag_t flux_s,     // estimated magnitude [4.13]
  input  flux_mag_t hb,         // full band width [4.13]
  output logic      flux_stat   // 1: raise flux, 0: lower flux
);

  logic signed [18:0] err;
  logic signed [18:0] half;

  always_comb begin
    err  = 19'(signed'({1'b0, flux_ref})) - 19'(signed'({1'b0, flux_s}));
    half = 19'(signed'({1'b0, hb})) >>> 1;
  end

  always_ff @(posedge clk) begin
    if (!rst_n)
      flux_stat <= 1'b1;
    else if (sample_en) begin
      if (err > half)       flux_stat <= 1'b1;
      else if (err < -half) flux_stat <= 1'b0;
    end
  end

endmodule
