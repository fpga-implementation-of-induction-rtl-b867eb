// im_motor_model: behavioural (not synthesizable) model of the voltage-fed
// induction machine and an ideal inverter, used only by the closed-loop
// testbenches. Standard two-axis model in the stationary (alpha, beta) frame
// with stator and rotor flux linkages as states:
//   dpsi_s/dt = u_s - Rs i_s
//   dpsi_r/dt = -Rr i_r + j NP w_m psi_r
//   i_s = (Lr psi_s - Lm psi_r)/D,  i_r = (Ls psi_r - Lm psi_s)/D,  D = Ls Lr - Lm^2
//   Te = 1.5 NP (psi_sa i_sb - psi_sb i_sa)
//   J dw_m/dt = Te - T_load - F w_m
// integrated with forward Euler in 5 us steps. Machine data come from vc_pkg
// (same machine the controller constants assume); J and F are those of the
// same 3 HP reference machine. The task `advance` applies the alpha/beta
// voltages for one period; the state is read directly.
module im_motor_model;
  import vc_pkg::*;
  localparam real J = 0.089;
  localparam real F = 0.005;
  localparam real DT = 5.0e-6;

  real psa = 0.0, psb = 0.0, pra = 0.0, prb = 0.0, wm = 0.0;
  real isa = 0.0, isb = 0.0, te = 0.0;

  function automatic real flux_mod();
    return $sqrt(pra * pra + prb * prb);
  endfunction

  task automatic advance(input real ua, input real ub, input real tload, input real period);
    real d, ira, irb, dpsa, dpsb, dpra, dprb, we;
    int steps;
    d = LS * LR - LM * LM;
    steps = int'(period / DT);
    for (int k = 0; k < steps; k++) begin
      isa = (LR * psa - LM * pra) / d;
      isb = (LR * psb - LM * prb) / d;
      ira = (LS * pra - LM * psa) / d;
      irb = (LS * prb - LM * psb) / d;
      te  = 1.5 * NP * (psa * isb - psb * isa);
      we  = NP * wm;
      dpsa = ua - RS * isa;
      dpsb = ub - RS * isb;
      dpra = -RR * ira - we * prb;
      dprb = -RR * irb + we * pra;
      psa += DT * dpsa;  psb += DT * dpsb;
      pra += DT * dpra;  prb += DT * dprb;
      wm  += DT * (te - tload - F * wm) / J;
    end
    isa = (LR * psa - LM * pra) / d;
    isb = (LR * psb - LM * prb) / d;
  endtask
endmodule
