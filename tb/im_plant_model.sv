// im_plant_model: behavioural model of an inverter-fed induction machine, for
// closed-loop testbenches only (not synthesizable: real arithmetic).
//
// Stationary-frame model with the rotor held at a fixed electrical speed WR:
//   d(psi_s)/dt = v_s - RS*i_s
//   d(psi_r)/dt = (LM/tau_r)*i_s - psi_r/tau_r + j*WR*psi_r,  tau_r = LR/RR
//   i_s = (psi_s - (LM/LR)*psi_r) / (sigma*LS)
// The stator voltage comes from the switching states and VDC. The model is
// advanced by DT on every clock edge (forward Euler). The phase currents are
// quantised to [5.12] and limited to +/-15.9 A, like an ideal current ADC.
// te_true is the torque in the estimator's convention,
// 3/4*P*(i_beta*psi_alpha - i_alpha*psi_beta), and flux_true the magnitude
// of the true stator flux, both from the model state. The default machine
// constants are test values.
module im_plant_model
  import dtc_pkg::*;
#(
  parameter real DT  = 0.5e-6,   // model time step per clock edge, s
  parameter real VDC = 540.0,
  parameter real RS  = 5.5,
  parameter real RR  = 4.45,
  parameter real LS  = 0.32,
  parameter real LR  = 0.32,
  parameter real LM  = 0.29,
  parameter real WR  = 300.0,    // rotor electrical speed, rad/s
  parameter real P   = 2.0       // pole pairs
) (
  input  logic    clk,
  input  logic    sa,
  input  logic    sb,
  input  logic    sc,
  output cur_ph_t ia,
  output cur_ph_t ib,
  output real     te_true,
  output real     flux_true
);

  real msa = 0.0, msb = 0.0, mra = 0.0, mrb = 0.0, isa = 0.0, isb = 0.0;

  function automatic cur_ph_t quant(input real x);
    if (x > 15.9) x = 15.9;
    if (x < -15.9) x = -15.9;
    return cur_ph_t'($rtoi(x * 4096.0));
  endfunction

  always @(posedge clk) begin
    real va, vb, dra, drb, sig;
    sig = 1.0 - LM * LM / (LS * LR);
    va  = VDC / 3.0 * (2.0 * real'(sa) - real'(sb) - real'(sc));
    vb  = VDC / $sqrt(3.0) * (real'(sb) - real'(sc));
    msa += (va - RS * isa) * DT;
    msb += (vb - RS * isb) * DT;
    dra = (LM * RR / LR) * isa - (RR / LR) * mra - WR * mrb;
    drb = (LM * RR / LR) * isb - (RR / LR) * mrb + WR * mra;
    mra += dra * DT;
    mrb += drb * DT;
    isa = (msa - LM / LR * mra) / (sig * LS);
    isb = (msb - LM / LR * mrb) / (sig * LS);
  end

  always_comb begin
    ia        = quant(isa);
    ib        = quant((-isa + $sqrt(3.0) * isb) / 2.0);
    te_true   = 0.75 * P * (isb * msa - isa * msb);
    flux_true = $sqrt(msa * msa + msb * msb);
  end

endmodule
