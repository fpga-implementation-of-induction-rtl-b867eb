// park_transform: stationary (alpha, beta) stator currents to the rotating
// (d, q) frame aligned with the rotor flux:
//   i_sd =  i_alpha cos(th) + i_beta sin(th)
//   i_sq = -i_alpha sin(th) + i_beta cos(th)
// Currents are Q7.8 A, cos/sin Q1.14. Timing: a fixed two-stage pipeline
// (four products registered, then sums truncated, saturated and registered);
// outputs follow the inputs by two clocks, with no handshake, as the block has
// none in the design. Pipeline depth and rounding are this design's choice.
module park_transform
  import vc_pkg::*;
(
  input  logic    clk,
  input  logic    rst,
  input  sample_t i_salpha,
  input  sample_t i_sbeta,
  input  sample_t cos_th,
  input  sample_t sin_th,
  output sample_t i_sd,
  output sample_t i_sq
);
  logic signed [31:0] p_ac, p_bs, p_as, p_bc;

  always_ff @(posedge clk) begin
    if (rst) begin
      p_ac <= '0; p_bs <= '0; p_as <= '0; p_bc <= '0;
      i_sd <= '0; i_sq <= '0;
    end else begin
      p_ac <= i_salpha * cos_th;
      p_bs <= i_sbeta  * sin_th;
      p_as <= i_salpha * sin_th;
      p_bc <= i_sbeta  * cos_th;
      i_sd <= sat16((64'(p_ac) + 64'(p_bs)) >>> FRAC_TRIG);
      i_sq <= sat16((64'(p_bc) - 64'(p_as)) >>> FRAC_TRIG);
    end
  end
endmodule
