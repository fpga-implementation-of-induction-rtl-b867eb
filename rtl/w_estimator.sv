// w_estimator: synchronous (stator-field) angular speed for the decoupling
// terms, from the rotor-flux-oriented slip relation
//   w = NP * w_r + (Lm/Tr) * i_sq / psi_r
// w_r is the mechanical rotor speed (Q11.4 rad/s), w the electrical
// synchronous speed (Q11.4 rad/s), i_sq Q7.8 A, psi_r Q3.12 Wb.
// psi_r is clamped below at PSI_MIN before the division, so that the
// start-up with no flux yet does not divide by zero; psi_clamp reports it.
// Timing: `start` latches the inputs and forms the numerator; the next clock
// starts a 33-clock divider; `ready` pulses one clock after it finishes,
// 36 clocks after the clock in which start is high, and w holds until the
// next result.
// The ports follow the design; the equation is the standard slip relation
// and the clamp, the formats and the divider are this design's choices.
module w_estimator
  import vc_pkg::*;
#(
  parameter int  NP_P    = NP,
  parameter real LM_TR   = LM / TR,
  parameter real PSI_MIN = 0.05
) (
  input  logic    clk,
  input  logic    rst,
  input  logic    start,
  input  sample_t w_r,
  input  sample_t i_sq,
  input  sample_t psi_r,
  output sample_t w,
  output logic    ready,
  output logic    psi_clamp
);
  localparam longint LMTR_Q = to_q(LM_TR, K_FRAC);
  localparam longint PMIN_Q = to_q(PSI_MIN, FRAC_PSI);
  // numerator i_sq*LMTR has FRAC_I+K_FRAC fraction bits; shifting it so that
  // (num / psi_r) comes out with FRAC_W fraction bits:
  localparam int NSH = FRAC_I + K_FRAC - FRAC_W - FRAC_PSI;

  sample_t            w_r_r;
  logic signed [31:0] num_r;
  logic        [15:0] den_r;
  logic               div_go, div_done, div_busy;
  logic signed [15:0] w_sl;
  logic signed [63:0] prod;

  always_comb prod = (64'(i_sq) * LMTR_Q) >>> NSH;

  always_ff @(posedge clk) begin
    if (rst) begin
      w_r_r <= '0; num_r <= '0; den_r <= 16'd1; div_go <= 1'b0;
      w <= '0; ready <= 1'b0; psi_clamp <= 1'b0;
    end else begin
      div_go <= 1'b0;
      ready  <= 1'b0;
      if (start) begin
        w_r_r  <= w_r;
        num_r  <= 32'(prod);
        if (64'(psi_r) < PMIN_Q) begin
          den_r     <= 16'(PMIN_Q);
          psi_clamp <= 1'b1;
        end else begin
          den_r     <= 16'(psi_r);
          psi_clamp <= 1'b0;
        end
        div_go <= 1'b1;
      end
      if (div_done) begin
        w     <= sat16(64'(NP_P) * 64'(w_r_r) + 64'(w_sl));
        ready <= 1'b1;
      end
    end
  end

  divider #(.NUM_W(32), .DEN_W(16), .FRAC(0), .Q_W(16)) u_div (
    .clk, .rst, .start(div_go), .num(num_r), .den(den_r),
    .quo(w_sl), .busy(div_busy), .done(div_done));
endmodule
