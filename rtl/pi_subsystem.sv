// pi_subsystem: the four PI controllers of the vector controller and their
// sequencing.
//   speed PI : spd_ref - w_r      -> i_sq reference   (Q11.4 in, Q7.8 out)
//   flux PI  : flux_ref - psi_r   -> i_sd reference   (Q3.12 in, Q7.8 out)
//   current PI (q): i_sq ref - i_sq -> v_sq            (Q7.8 in, Q10.5 out)
//   current PI (d): i_sd ref - i_sd -> v_sd
// On START the inputs are captured in enable registers. The outer (speed and
// flux) PIs are started one clock later; their outputs pass a one-clock
// delay; the measured currents pass 3+1 clocks of delay; the current PIs are
// started 1+3+1 clocks after START, and their outputs pass one more clock.
// READY is START delayed by 1+3+1+5+1 = 11 clocks, when v_sq/v_sd are valid;
// the outputs then hold until the next START. These delays follow the
// design's diagram. The PI gains and limits are this design's own, chosen
// for the assumed machine and a 100 us control period.
module pi_subsystem
  import vc_pkg::*;
#(
  parameter real SPD_KP  = 2.0,
  parameter real SPD_KI  = 0.004,
  parameter real SPD_LIM = 20.0,
  parameter real FLX_KP  = 40.0,
  parameter real FLX_KI  = 0.3,
  parameter real FLX_LIM = 20.0,
  parameter real CUR_KP  = 8.0,
  parameter real CUR_KI  = 0.2,
  parameter real CUR_LIM = 300.0
) (
  input  logic    clk,
  input  logic    rst,
  input  logic    start,
  input  sample_t spd_ref,
  input  sample_t w_r,
  input  sample_t flux_ref,
  input  sample_t psi_r,
  input  sample_t i_sq,
  input  sample_t i_sd,
  output sample_t v_sq,
  output sample_t v_sd,
  output logic    ready,
  output logic [3:0] sat_o    // {cur_d, cur_q, flux, speed} PI clamped
);
  // Input registers, enabled by START.
  sample_t spd_ref_r, w_r_r, psi_r_r, i_sq_r, i_sd_r;
  always_ff @(posedge clk) begin
    if (rst) begin
      spd_ref_r <= '0; w_r_r <= '0; psi_r_r <= '0; i_sq_r <= '0; i_sd_r <= '0;
    end else if (start) begin
      spd_ref_r <= spd_ref; w_r_r <= w_r; psi_r_r <= psi_r;
      i_sq_r <= i_sq; i_sd_r <= i_sd;
    end
  end

  // START sequencing.
  logic st1, st4, st5, st5b, st10, st11;
  delay_line #(.WIDTH(1), .DEPTH(1)) u_d3  (.clk, .rst, .d(start), .q(st1));
  delay_line #(.WIDTH(1), .DEPTH(3)) u_d2  (.clk, .rst, .d(st1),   .q(st4));
  delay_line #(.WIDTH(1), .DEPTH(1)) u_d8  (.clk, .rst, .d(st4),   .q(st5));
  delay_line #(.WIDTH(1), .DEPTH(1)) u_d12 (.clk, .rst, .d(st4),   .q(st5b));
  delay_line #(.WIDTH(1), .DEPTH(5)) u_d1  (.clk, .rst, .d(st5b),  .q(st10));
  delay_line #(.WIDTH(1), .DEPTH(1)) u_d15 (.clk, .rst, .d(st10),  .q(st11));
  assign ready = st11;

  // Outer loops.
  sample_t isq_ref, isd_ref, isq_ref_d, isd_ref_d;
  pi_controller #(.IN_FRAC(FRAC_W), .OUT_FRAC(FRAC_I),
                  .KP(SPD_KP), .KI(SPD_KI), .LIM(SPD_LIM)) u_speed_pi (
    .clk, .rst, .start(st1), .ref_i(spd_ref_r), .fb_i(w_r_r),
    .out_o(isq_ref), .sat_o(sat_o[0]));
  pi_controller #(.IN_FRAC(FRAC_PSI), .OUT_FRAC(FRAC_I),
                  .KP(FLX_KP), .KI(FLX_KI), .LIM(FLX_LIM)) u_flux_pi (
    .clk, .rst, .start(st1), .ref_i(flux_ref), .fb_i(psi_r_r),
    .out_o(isd_ref), .sat_o(sat_o[1]));
  delay_line #(.WIDTH(16), .DEPTH(1)) u_dref_q (.clk, .rst, .d(isq_ref), .q(isq_ref_d));
  delay_line #(.WIDTH(16), .DEPTH(1)) u_dref_d (.clk, .rst, .d(isd_ref), .q(isd_ref_d));

  // Measured currents: 3 + 1 clocks to meet the current PIs.
  sample_t isq_m, isd_m;
  delay_line #(.WIDTH(16), .DEPTH(4)) u_dcur_q (.clk, .rst, .d(i_sq_r), .q(isq_m));
  delay_line #(.WIDTH(16), .DEPTH(4)) u_dcur_d (.clk, .rst, .d(i_sd_r), .q(isd_m));

  // Inner loops.
  sample_t vq, vd;
  pi_controller #(.IN_FRAC(FRAC_I), .OUT_FRAC(FRAC_U),
                  .KP(CUR_KP), .KI(CUR_KI), .LIM(CUR_LIM)) u_cur_q_pi (
    .clk, .rst, .start(st5), .ref_i(isq_ref_d), .fb_i(isq_m),
    .out_o(vq), .sat_o(sat_o[2]));
  pi_controller #(.IN_FRAC(FRAC_I), .OUT_FRAC(FRAC_U),
                  .KP(CUR_KP), .KI(CUR_KI), .LIM(CUR_LIM)) u_cur_d_pi (
    .clk, .rst, .start(st5), .ref_i(isd_ref_d), .fb_i(isd_m),
    .out_o(vd), .sat_o(sat_o[3]));
  delay_line #(.WIDTH(16), .DEPTH(1)) u_d13 (.clk, .rst, .d(vq), .q(v_sq));
  delay_line #(.WIDTH(16), .DEPTH(1)) u_d14 (.clk, .rst, .d(vd), .q(v_sd));
endmodule
