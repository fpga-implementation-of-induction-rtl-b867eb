// vector_sg: the vector control core - rotor flux oriented control of an
// induction motor, one control step per aq_done strobe.
//
// Data path of one step (clock numbers relative to aq_done):
//   0      isa, isc, m_w, usa, usb captured in enable registers
//   1      Clarke transform (1 clock) -> i_alpha, i_beta, held from clock 3
//   3      rotor flux estimator started (aq_done delayed 1+2); usa/usb reach
//          it through a 2-clock delay. 56 clocks later it delivers
//          cos/sin of the flux angle and |psi_r|, passed through one clock.
//   R      Park transform (2 clocks) -> i_sd, i_sq
//   R+3    flux-estimator READY delayed 3 starts both the PI subsystem
//          (READY after 11 clocks) and the omega estimator (about 36)
//   J      when both have reported READY, the decoupling block starts
//          (3 clocks), then the inverse Park transform (2 clocks)
//   D+3    decoupling READY delayed 3 captures u_a/u_b; `ready` one clock
//          later marks new outputs.
// A step takes about 100 clocks; aq_done must not come more often.
// The blocks, their ports and the short delays around the flux estimator
// and the output registers follow the design's block diagram. The long
// alignment delays of that diagram, which matched the latencies of the
// original blocks, are replaced by a join of the two READY pulses, since
// every block here holds its outputs until its next start.
// odebug1/odebug2 carry the estimated stator flux (alpha, beta). The PI
// clamp flags (pi_sat) and the speed estimator's flux-floor flag (psi_clamp)
// are internal status kept for observation in simulation; they drive no
// port, which the linter reports as unused.
module vector_sg
  import vc_pkg::*;
#(
  parameter real FLUX_REF = 1.0
) (
  input  logic    clk,
  input  logic    rst,
  input  sample_t spd_ref,
  input  sample_t isa,
  input  sample_t isc,
  input  logic    aq_done,
  input  sample_t m_w,
  input  sample_t usa,
  input  sample_t usb,
  output sample_t u_a,
  output sample_t u_b,
  output logic    ready,
  output sample_t odebug1,
  output sample_t odebug2
);
  localparam sample_t FLUX_REF_Q = sample_t'(to_q(FLUX_REF, FRAC_PSI));

  // ---- acquisition registers (enable = aq_done)
  sample_t isa_r, isc_r, mw_r, usa_r, usb_r;
  always_ff @(posedge clk) begin
    if (rst) begin
      isa_r <= '0; isc_r <= '0; mw_r <= '0; usa_r <= '0; usb_r <= '0;
    end else if (aq_done) begin
      isa_r <= isa; isc_r <= isc; mw_r <= m_w; usa_r <= usa; usb_r <= usb;
    end
  end

  logic aq_d1, aq_d2, aq_d3;
  delay_line #(.WIDTH(1), .DEPTH(1)) u_dly   (.clk, .rst, .d(aq_done), .q(aq_d1));
  delay_line #(.WIDTH(1), .DEPTH(1)) u_dly_e (.clk, .rst, .d(aq_d1),   .q(aq_d2));
  delay_line #(.WIDTH(1), .DEPTH(2)) u_dly15 (.clk, .rst, .d(aq_d1),   .q(aq_d3));

  // ---- Clarke transform and its output registers
  sample_t i_al, i_be, i_al_r, i_be_r;
  clarke_transform u_clarke (.clk, .rst, .i_sa(isa_r), .i_sc(isc_r),
                             .i_salpha(i_al), .i_sbeta(i_be));
  always_ff @(posedge clk) begin
    if (rst) begin
      i_al_r <= '0; i_be_r <= '0;
    end else if (aq_d2) begin
      i_al_r <= i_al; i_be_r <= i_be;
    end
  end

  // ---- rotor flux estimator
  sample_t usa_d, usb_d;
  delay_line #(.WIDTH(16), .DEPTH(2)) u_dly22 (.clk, .rst, .d(usa_r), .q(usa_d));
  delay_line #(.WIDTH(16), .DEPTH(2)) u_dly23 (.clk, .rst, .d(usb_r), .q(usb_d));

  sample_t fe_cos, fe_sin, fe_psi;
  logic    fe_rdy;
  rotor_flux_estimator u_flux (
    .clk, .rst, .start(aq_d3), .u_sa(usa_d), .u_sb(usb_d), .i_sa(i_al_r), .i_sb(i_be_r),
    .cos_th(fe_cos), .sin_th(fe_sin), .psi_r(fe_psi),
    .db_psy_sa(odebug1), .db_psy_sb(odebug2), .ready(fe_rdy));

  sample_t cos_d, sin_d, psi_d;
  logic    fe_rdy_d;
  delay_line #(.WIDTH(16), .DEPTH(1)) u_dly4  (.clk, .rst, .d(fe_cos), .q(cos_d));
  delay_line #(.WIDTH(16), .DEPTH(1)) u_dly5  (.clk, .rst, .d(fe_sin), .q(sin_d));
  delay_line #(.WIDTH(16), .DEPTH(1)) u_dly21 (.clk, .rst, .d(fe_psi), .q(psi_d));
  delay_line #(.WIDTH(1),  .DEPTH(1)) u_dly20 (.clk, .rst, .d(fe_rdy), .q(fe_rdy_d));

  // ---- Park transform
  sample_t i_sd, i_sq;
  park_transform u_park (.clk, .rst, .i_salpha(i_al_r), .i_sbeta(i_be_r),
                         .cos_th(cos_d), .sin_th(sin_d), .i_sd, .i_sq);

  // ---- omega estimator and PI subsystem, started together
  logic    ctl_start;
  sample_t psi_w;
  delay_line #(.WIDTH(1),  .DEPTH(3)) u_dly1  (.clk, .rst, .d(fe_rdy_d), .q(ctl_start));
  delay_line #(.WIDTH(16), .DEPTH(3)) u_dly18 (.clk, .rst, .d(psi_d),    .q(psi_w));

  sample_t w_s;
  logic    w_rdy, psi_clamp;
  w_estimator u_west (.clk, .rst, .start(ctl_start), .w_r(mw_r), .i_sq, .psi_r(psi_w),
                      .w(w_s), .ready(w_rdy), .psi_clamp);

  sample_t v_sq, v_sd;
  logic    pi_rdy;
  logic [3:0] pi_sat;
  pi_subsystem u_pi (.clk, .rst, .start(ctl_start), .spd_ref, .w_r(mw_r),
                     .flux_ref(FLUX_REF_Q), .psi_r(psi_w), .i_sq, .i_sd,
                     .v_sq, .v_sd, .ready(pi_rdy), .sat_o(pi_sat));

  // ---- join: start the decoupling when both results are in
  logic pi_f, w_f, dec_start;
  always_ff @(posedge clk) begin
    if (rst) begin
      pi_f <= 1'b0; w_f <= 1'b0; dec_start <= 1'b0;
    end else begin
      dec_start <= 1'b0;
      if (ctl_start) begin
        pi_f <= 1'b0; w_f <= 1'b0;
      end else if ((pi_f | pi_rdy) && (w_f | w_rdy)) begin
        pi_f <= 1'b0; w_f <= 1'b0;
        dec_start <= 1'b1;
      end else begin
        pi_f <= pi_f | pi_rdy;
        w_f  <= w_f | w_rdy;
      end
    end
  end

  // ---- decoupling and inverse Park
  sample_t u_sq, u_sd;
  logic    dec_rdy;
  decoupling u_dec (.clk, .rst, .start(dec_start), .v_sq, .v_sd, .i_sq, .i_sd,
                    .w(w_s), .psi_r(psi_w), .u_sq, .u_sd, .ready(dec_rdy));

  sample_t u_al, u_be;
  inverse_park u_ipark (.clk, .rst, .u_sq, .u_sd, .sin_th(sin_d), .cos_th(cos_d),
                        .u_salpha(u_al), .u_sbeta(u_be));

  // ---- output registers
  logic out_en;
  delay_line #(.WIDTH(1), .DEPTH(3)) u_dly2 (.clk, .rst, .d(dec_rdy), .q(out_en));
  delay_line #(.WIDTH(1), .DEPTH(1)) u_dly3 (.clk, .rst, .d(out_en),  .q(ready));
  always_ff @(posedge clk) begin
    if (rst) begin
      u_a <= '0; u_b <= '0;
    end else if (out_en) begin
      u_a <= u_al; u_b <= u_be;
    end
  end
endmodule
