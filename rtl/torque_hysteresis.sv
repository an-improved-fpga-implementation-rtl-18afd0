// torque_hysteresis: three-level hysteresis comparator of the torque loop.
//
// The error E = te_ref - te is compared with half the band width hb:
//   E >  hb/2                    -> T_INC  (active vector that raises torque)
//   E < -hb/2                    -> T_DEC  (active vector that lowers torque)
//   T_INC and E <= 0             -> T_ZERO (zero vector)
//   T_DEC and E >= 0             -> T_ZERO
//   otherwise                    -> hold.
// The three output levels and the band are those of classic DTC; the exact
// switching thresholds, the register and its reset to T_ZERO are this design's
// choices. The state updates on clock edges where sample_en is high.
module torque_hysteresis
  import dtc_pkg::*;
(
  input  logic    clk,
  input  logic    rst_n,
  input  logic    sample_en,
  input  torque_t te_ref,   // [6.20]
  input  torque_t te,       // estimated torque [6.20]
  input  torque_t hb,       // full band width [6.20], non-negative
  output tstat_e  t_stat
);

  logic signed [26:0] err;
  logic signed [26:0] half;

  always_comb begin
    err  = 27'(te_ref) - 27'(te);
    half = 27'(hb) >>> 1;
  end

  always_ff @(posedge clk) begin
    if (!rst_n)
      t_stat <= T_ZERO;
    else if (sample_en) begin
      if (err > half)                        t_stat <= T_INC;
      else if (err < -half)                  t_stat <= T_DEC;
      else if (t_stat == T_INC && err <= 0)  t_stat <= T_ZERO;
      else if (t_stat == T_DEC && err >= 0)  t_stat <= T_ZERO;
    end
  end

endmodule
