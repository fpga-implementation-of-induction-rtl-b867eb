// vc_pkg: shared types, fixed-point formats, machine constants and helper
// functions of the induction-motor vector controller.
//
// Every signal between blocks is a 16-bit two's complement word (the design
// works at 16-bit precision throughout). The binary point depends on the
// physical quantity and is this design's own choice:
//   current  Q7.8  (A)            FRAC_I   = 8
//   voltage  Q10.5 (V)            FRAC_U   = 5
//   flux     Q3.12 (Wb)           FRAC_PSI = 12
//   speed    Q11.4 (rad/s)        FRAC_W   = 4
//   sin/cos  Q1.14                FRAC_TRIG= 14
// Constant coefficients carry K_FRAC = 16 fraction bits. Products are
// truncated (arithmetic shift right, i.e. floor) and results saturated.
//
// Machine constants: the rated data (2238 VA, 220 Vrms, 5.87 Arms, 2 pole
// pairs, 60 Hz) follow the motor the controller was designed for; the
// resistances and inductances are those of the common 3 HP / 220 V / 60 Hz
// reference machine with that rating and are an assumption, as is the
// 100 us control period.
package vc_pkg;

  localparam int W = 16;
  typedef logic signed [W-1:0] sample_t;

  localparam int FRAC_I    = 8;
  localparam int FRAC_U    = 5;
  localparam int FRAC_PSI  = 12;
  localparam int FRAC_W    = 4;
  localparam int FRAC_TRIG = 14;
  localparam int K_FRAC    = 16;

  localparam sample_t S_MAX = 16'sh7fff;
  localparam sample_t S_MIN = -16'sh7fff - 16'sh1;

  // Machine data
  localparam int  NP  = 2;          // pole pairs
  localparam real RS  = 0.435;      // stator resistance, ohm
  localparam real RR  = 0.816;      // rotor resistance, ohm
  localparam real LLS = 0.002;      // stator leakage, H
  localparam real LLR = 0.002;      // rotor leakage, H
  localparam real LM  = 0.06931;    // magnetising inductance, H
  localparam real LS  = LM + LLS;
  localparam real LR  = LM + LLR;
  localparam real SIGMA = 1.0 - (LM * LM) / (LS * LR);
  localparam real TR  = LR / RR;    // rotor time constant, s
  localparam real TS  = 100.0e-6;   // control period, s

  // Real constant to fixed point with f fraction bits, rounded to nearest.
  // (A real-to-integer cast rounds to the nearest integer.)
  function automatic longint to_q(input real x, input int f);
    return longint'(x * (2.0 ** f));
  endfunction

  // Saturate a wide signed value to a 16-bit sample.
  function automatic sample_t sat16(input logic signed [63:0] v);
    if (v > 64'sd32767)       return S_MAX;
    else if (v < -64'sd32768) return S_MIN;
    else                      return sample_t'(v[W-1:0]);
  endfunction

endpackage
