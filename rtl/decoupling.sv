// decoupling: feed-forward compensation of the cross-coupling between the d
// and q stator voltage equations in rotor flux orientation. The current PI
// outputs v_sd, v_sq become the voltage commands
//   u_sd = v_sd - w * sigmaLs * i_sq
//   u_sq = v_sq + w * sigmaLs * i_sd + w * (Lm/Lr) * psi_r
// with w the synchronous speed (Q11.4 rad/s electrical), voltages Q10.5 V,
// currents Q7.8 A and flux Q3.12 Wb.
// Timing: a three-stage pipeline started by `start`: inputs latched, speed
// products, coefficient products, then sums saturated and registered with a
// one-clock `ready` pulse 4 clocks after the clock in which start is high;
// outputs hold until the next start.
// The ports follow the design; the equations are the standard decoupling
// terms and the machine constants are assumptions (see vc_pkg).
module decoupling
  import vc_pkg::*;
#(
  parameter real SIGMA_LS = SIGMA * LS,
  parameter real LM_LR    = LM / LR
) (
  input  logic    clk,
  input  logic    rst,
  input  logic    start,
  input  sample_t v_sq,
  input  sample_t v_sd,
  input  sample_t i_sq,
  input  sample_t i_sd,
  input  sample_t w,
  input  sample_t psi_r,
  output sample_t u_sq,
  output sample_t u_sd,
  output logic    ready
);
  localparam longint SLS_Q  = to_q(SIGMA_LS, K_FRAC);
  localparam longint LMLR_Q = to_q(LM_LR, K_FRAC);
  localparam int SH_I   = FRAC_W + FRAC_I + K_FRAC - FRAC_U;
  localparam int SH_PSI = FRAC_W + FRAC_PSI + K_FRAC - FRAC_U;

  logic [2:0]         vld;
  sample_t            vq0, vd0, iq0, id0, w0, p0;
  sample_t            vq1, vd1, vq2, vd2;
  logic signed [31:0] t_wiq, t_wid, t_wpsi;
  logic signed [63:0] c_wiq, c_wid, c_wpsi;

  always_ff @(posedge clk) begin
    if (rst) begin
      vld <= '0;
      vq0 <= '0; vd0 <= '0; iq0 <= '0; id0 <= '0; w0 <= '0; p0 <= '0;
      vq1 <= '0; vd1 <= '0; vq2 <= '0; vd2 <= '0;
      t_wiq <= '0; t_wid <= '0; t_wpsi <= '0;
      c_wiq <= '0; c_wid <= '0; c_wpsi <= '0;
      u_sq <= '0; u_sd <= '0; ready <= 1'b0;
    end else begin
      vld <= {vld[1:0], start};
      if (start) begin
        vq0 <= v_sq; vd0 <= v_sd; iq0 <= i_sq; id0 <= i_sd; w0 <= w; p0 <= psi_r;
      end
      // stage 1: speed products
      t_wiq  <= w0 * iq0;
      t_wid  <= w0 * id0;
      t_wpsi <= w0 * p0;
      vq1 <= vq0; vd1 <= vd0;
      // stage 2: coefficient products
      c_wiq  <= 64'(t_wiq)  * SLS_Q;
      c_wid  <= 64'(t_wid)  * SLS_Q;
      c_wpsi <= 64'(t_wpsi) * LMLR_Q;
      vq2 <= vq1; vd2 <= vd1;
      // stage 3: sums
      ready <= vld[2];
      if (vld[2]) begin
        u_sd <= sat16(64'(vd2) - (c_wiq >>> SH_I));
        u_sq <= sat16(64'(vq2) + (c_wid >>> SH_I) + (c_wpsi >>> SH_PSI));
      end
    end
  end
endmodule
