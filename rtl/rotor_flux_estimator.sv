// rotor_flux_estimator: voltage-model estimator of the rotor flux vector, its
// modulus and the cosine/sine of its angle, which orient the Park transforms.
// Per control sample:
//   psi_s  += TS * (u_s - RS * i_s)              (alpha and beta)
//   psi_r   = (Lr/Lm) * (psi_s - sigmaLs * i_s)
//   |psi_r| = sqrt(psi_ra^2 + psi_rb^2)           (square root)
//   cos_th  = psi_ra / |psi_r|, sin_th = psi_rb / |psi_r|   (two divisions)
// The stator-flux integrators are 48-bit with 32 fraction bits so that the
// small increments of one 100 us sample are not lost; everything leaving the
// block is 16-bit: cos/sin Q1.14, fluxes Q3.12 Wb (db_psy_* are the stator
// flux components, for observation). If |psi_r| is zero, cos=1 and sin=0.
// Timing: `start` latches the voltages and currents; a sequencer then runs
// integrate, rotor-flux, square, the 17-clock square root and the two
// 31-clock divisions side by side; `ready` is high 56 clocks after the
// clock in which start is high (earlier when the flux is zero), and the outputs hold until the next result. A start while busy is
// ignored and flagged by an assertion.
// The ports and the one-square-root / two-division structure follow the
// design; the equations are the standard voltage model, and the machine
// constants (vc_pkg), the formats and the sequencer are this design's choices.
module rotor_flux_estimator
  import vc_pkg::*;
#(
  parameter real RS_P     = RS,
  parameter real TS_P     = TS,
  parameter real SIGMA_LS = SIGMA * LS,
  parameter real LR_LM    = LR / LM
) (
  input  logic    clk,
  input  logic    rst,
  input  logic    start,
  input  sample_t u_sa,
  input  sample_t u_sb,
  input  sample_t i_sa,
  input  sample_t i_sb,
  output sample_t cos_th,
  output sample_t sin_th,
  output sample_t psi_r,
  output sample_t db_psy_sa,
  output sample_t db_psy_sb,
  output logic    ready
);
  localparam int     AF     = 32;                     // integrator fraction bits
  localparam int     DF     = 24;                     // voltage-drop fraction bits
  localparam longint RS_Q   = to_q(RS_P, K_FRAC);      // x i (Q.8) -> DF
  localparam longint TS_Q   = to_q(TS_P, AF);
  localparam longint SLS_Q  = to_q(SIGMA_LS, K_FRAC);
  localparam longint LRLM_Q = to_q(LR_LM, K_FRAC);

  typedef enum logic [2:0] {S_IDLE, S_INTEG, S_ROTOR, S_SQUARE, S_SQRT, S_DIV} state_t;
  state_t state;

  sample_t            ua, ub, ia, ib;
  logic signed [47:0] psa, psb;                       // stator flux, Q.32
  sample_t            pra, prb;                       // rotor flux, Q3.12
  logic signed [63:0] da, db, pa_w, pb_w;
  logic        [31:0] sq;

  logic        sqrt_go, sqrt_done, sqrt_busy;
  logic [15:0] root;
  logic        div_go, div_done_a, div_done_b, div_busy_a, div_busy_b;
  sample_t     q_cos, q_sin;

  always_comb begin
    da   = (64'(ua) <<< (DF - FRAC_U)) - 64'(ia) * RS_Q;
    db   = (64'(ub) <<< (DF - FRAC_U)) - 64'(ib) * RS_Q;
    pa_w = (((64'(psa) >>> (AF - DF)) - 64'(ia) * SLS_Q) * LRLM_Q) >>> (DF + K_FRAC - FRAC_PSI);
    pb_w = (((64'(psb) >>> (AF - DF)) - 64'(ib) * SLS_Q) * LRLM_Q) >>> (DF + K_FRAC - FRAC_PSI);
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      state <= S_IDLE;
      ua <= '0; ub <= '0; ia <= '0; ib <= '0;
      psa <= '0; psb <= '0; pra <= '0; prb <= '0; sq <= '0;
      sqrt_go <= 1'b0; div_go <= 1'b0;
      cos_th <= sample_t'(1 <<< FRAC_TRIG); sin_th <= '0; psi_r <= '0;
      db_psy_sa <= '0; db_psy_sb <= '0; ready <= 1'b0;
    end else begin
      sqrt_go <= 1'b0;
      div_go  <= 1'b0;
      ready   <= 1'b0;
      unique case (state)
        S_IDLE: if (start) begin
          ua <= u_sa; ub <= u_sb; ia <= i_sa; ib <= i_sb;
          state <= S_INTEG;
        end
        S_INTEG: begin
          psa <= psa + 48'((da * TS_Q) >>> DF);
          psb <= psb + 48'((db * TS_Q) >>> DF);
          state <= S_ROTOR;
        end
        S_ROTOR: begin
          pra <= sat16(pa_w);
          prb <= sat16(pb_w);
          db_psy_sa <= sat16(64'(psa) >>> (AF - FRAC_PSI));
          db_psy_sb <= sat16(64'(psb) >>> (AF - FRAC_PSI));
          state <= S_SQUARE;
        end
        S_SQUARE: begin
          sq <= 32'(pra * pra) + 32'(prb * prb);
          sqrt_go <= 1'b1;
          state <= S_SQRT;
        end
        S_SQRT: if (sqrt_done) begin
          psi_r <= sat16(64'(root));
          if (root == 16'd0) begin
            cos_th <= sample_t'(1 <<< FRAC_TRIG);
            sin_th <= '0;
            ready  <= 1'b1;
            state  <= S_IDLE;
          end else begin
            div_go <= 1'b1;
            state  <= S_DIV;
          end
        end
        S_DIV: if (div_done_a && div_done_b) begin
          cos_th <= q_cos;
          sin_th <= q_sin;
          ready  <= 1'b1;
          state  <= S_IDLE;
        end
        default: state <= S_IDLE;
      endcase
    end
  end

  // Handshake rules: a new sample must not arrive while one is in progress
  // (the control period is too short otherwise), and the two dividers,
  // started together, finish together.
  always_ff @(posedge clk) begin
    if (!rst) begin
      assert (!start || state == S_IDLE)
        else $error("rotor_flux_estimator: start while busy");
      assert (div_done_a == div_done_b)
        else $error("rotor_flux_estimator: dividers out of step");
    end
  end

  isqrt #(.N(16)) u_sqrt (
    .clk, .rst, .start(sqrt_go), .rad(sq), .root, .busy(sqrt_busy), .done(sqrt_done));

  divider #(.NUM_W(16), .DEN_W(16), .FRAC(FRAC_TRIG), .Q_W(16)) u_div_cos (
    .clk, .rst, .start(div_go), .num(pra), .den(root),
    .quo(q_cos), .busy(div_busy_a), .done(div_done_a));
  divider #(.NUM_W(16), .DEN_W(16), .FRAC(FRAC_TRIG), .Q_W(16)) u_div_sin (
    .clk, .rst, .start(div_go), .num(prb), .den(root),
    .quo(q_sin), .busy(div_busy_b), .done(div_done_b));
endmodule
