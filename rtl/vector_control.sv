// vector_control: top level of the induction-motor vector controller.
// It holds what sits between the fixed-point input and output boundary of
// the controller: the start_edge_detect block, which turns the external
// START level into the aq_done sampling strobe (one clock after START
// falls), and the vector control core vector_sg.
// Inputs: speed reference vit_ref (Q11.4 rad/s, mechanical), phase currents
// a and c (Q7.8 A), measured rotor speed (Q11.4 rad/s, mechanical) and the
// stator voltages alpha/beta (Q10.5 V). Outputs: the alpha/beta voltage
// commands u_a/u_b (Q10.5 V) for the PWM firing stage, which is outside this
// design, `done` when they are new, and the estimated stator flux alpha/beta
// (Q3.12 Wb) as debug1/debug2.
// Timing: one control step per falling edge of START, about 100 clocks from
// the edge to `done`; START must fall no more often than that.
module vector_control
  import vc_pkg::*;
(
  input  logic    clk,
  input  logic    rst,
  input  sample_t vit_ref,
  input  logic    start,
  input  sample_t db_i_s_a,
  input  sample_t db_i_s_c,
  input  sample_t db_w_r,
  input  sample_t usa,
  input  sample_t usb,
  output sample_t u_a,
  output sample_t u_b,
  output logic    done,
  output sample_t debug1,
  output sample_t debug2
);
  logic aq_done;

  start_edge_detect u_edge (.clk, .rst, .start, .aq_done);

  vector_sg u_core (
    .clk, .rst, .spd_ref(vit_ref), .isa(db_i_s_a), .isc(db_i_s_c), .aq_done,
    .m_w(db_w_r), .usa, .usb, .u_a, .u_b, .ready(done),
    .odebug1(debug1), .odebug2(debug2));
endmodule
