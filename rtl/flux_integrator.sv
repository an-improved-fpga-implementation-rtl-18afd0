// flux_integrator: stator flux of one alpha-beta axis, integrated by the
// backward Euler rule with a low-pass leak against dc-offset drift.
//
//   phi(n) = ( phi(n-1) + (V(n) - Rs*I(n)) * Ts ) * (1 - wc*Ts)
//
// Rs*I is truncated to [11.12] and subtracted from V; the difference times Ts
// (28'h29F, 5 us in [1.27]) is kept as [1.27]; it is added to the stored flux
// [4.27] and the sum is multiplied by the leak factor 23'h3FFF97 (0.999975 in
// [1.22], wc = 5 rad/s) and truncated back to [4.27]. All word formats and
// constants follow the published design; TS and LPF_K are parameters whose
// defaults are the published 5 us codes, so that other sampling periods can
// be studied. The placement of the leak factor
// (on the whole sum, not only on the increment) follows the flux equation.
//
// Timing: the flux register loads on a clock edge where sample_en is high (one
// strobe per 5 us sampling period); V and I are used in the same period, so
// phi(n) is available one sampling period after its inputs were applied.
module flux_integrator
  import dtc_pkg::*;
#(
  parameter logic signed [27:0] TS    = TS_Q27,     // Ts * 2^27
  parameter logic signed [22:0] LPF_K = LPF_K_Q22   // (1 - wc*Ts) * 2^22
) (
  input  logic    clk,
  input  logic    rst_n,      // synchronous, clears the flux
  input  logic    sample_en,  // sampling strobe
  input  volt_t   v,          // stator voltage of this axis [10.12]
  input  cur_ab_t i,          // stator current of this axis [6.12]
  input  rs_t     rs,         // stator resistance [5.5]
  output flux_t   phi         // stator flux of this axis [4.27]
);

  logic signed [28:0] rsi_q17;   // Rs*I              [12.17]
  logic signed [22:0] rsi_q12;   // Rs*I              [11.12]
  logic signed [22:0] emf_q12;   // V - Rs*I          [11.12]
  logic signed [50:0] inc_q39;   // (V - Rs*I)*Ts     [12.39]
  logic signed [27:0] inc_q27;   //                   [1.27]
  logic signed [30:0] sum_q27;   // phi(n-1) + inc    [4.27]
  logic signed [53:0] leak_q49;  // sum*(1 - wc*Ts)   [5.49]
  flux_t              phi_next;

  always_comb begin
    rsi_q17  = 29'(i) * 29'(signed'({1'b0, rs}));
    rsi_q12  = rsi_q17[27:5];
    emf_q12  = 23'(v) - rsi_q12;
    inc_q39  = 51'(emf_q12) * 51'(TS);
    inc_q27  = inc_q39[39:12];
    sum_q27  = phi + 31'(inc_q27);
    leak_q49 = 54'(sum_q27) * 54'(LPF_K);
    phi_next = leak_q49[52:22];
  end

  always_ff @(posedge clk) begin
    if (!rst_n)         phi <= '0;
    else if (sample_en) phi <= phi_next;
  end

endmodule
