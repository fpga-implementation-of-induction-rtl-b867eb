// pi_controller: one discrete proportional-integral controller,
//   e   = ref - fb
//   I  <= clamp(I + KI*e)           (KI = Ki*Ts, gain per sample)
//   out = clamp(KP*e + I)
// The integrator is a multiply-accumulate that only advances when `start`
// is high, once per control sample, so it cannot run away between samples.
// Both the integrator and the output are clamped to +/-LIM (output units),
// which is also the anti-windup.
//
// Formats: ref/fb carry IN_FRAC fraction bits, out carries OUT_FRAC; the gains
// are real parameters turned into 16-fraction-bit constants at elaboration.
// The integrator is kept at IN_FRAC+16 fraction bits in 64 bits.
//
// Timing: start in cycle n latches the error (edge n); out_o and sat_o are
// updated at edge n+1 and then held until the next start (latency 2).
// The enable-driven MAC follows the design; the PI form, the clamping and
// the gains are this design's choices.
module pi_controller
  import vc_pkg::*;
#(
  parameter int  IN_FRAC  = 8,
  parameter int  OUT_FRAC = 5,
  parameter real KP       = 1.0,
  parameter real KI       = 0.01,
  parameter real LIM      = 100.0
) (
  input  logic    clk,
  input  logic    rst,
  input  logic    start,
  input  sample_t ref_i,
  input  sample_t fb_i,
  output sample_t out_o,
  output logic    sat_o
);
  localparam int     SH     = IN_FRAC + K_FRAC - OUT_FRAC;
  localparam longint KP_Q   = to_q(KP, K_FRAC);
  localparam longint KI_Q   = to_q(KI, K_FRAC);
  localparam longint LIM_O  = to_q(LIM, OUT_FRAC);      // limit at output scale
  localparam longint LIM_A  = LIM_O <<< SH;             // limit at integrator scale

  logic signed [16:0] err;
  logic               s1;
  logic signed [63:0] integ;
  logic signed [63:0] integ_next, sum, out_w;
  logic               clip_i, clip_o;

  always_comb begin
    integ_next = integ + 64'(err) * KI_Q;
    clip_i = 1'b0;
    if (integ_next > LIM_A)       begin integ_next = LIM_A;  clip_i = 1'b1; end
    else if (integ_next < -LIM_A) begin integ_next = -LIM_A; clip_i = 1'b1; end
    sum   = 64'(err) * KP_Q + integ_next;
    out_w = sum >>> SH;
    clip_o = 1'b0;
    if (out_w > LIM_O)       begin out_w = LIM_O;  clip_o = 1'b1; end
    else if (out_w < -LIM_O) begin out_w = -LIM_O; clip_o = 1'b1; end
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      err   <= '0;
      s1    <= 1'b0;
      integ <= '0;
      out_o <= '0;
      sat_o <= 1'b0;
    end else begin
      s1 <= start;
      if (start) err <= 17'(ref_i) - 17'(fb_i);
      if (s1) begin
        integ <= integ_next;
        out_o <= sat16(out_w);
        sat_o <= clip_i | clip_o;
      end
    end
  end

  initial begin
    assert (SH >= 0) else $error("pi_controller: OUT_FRAC too large for IN_FRAC");
  end
endmodule
