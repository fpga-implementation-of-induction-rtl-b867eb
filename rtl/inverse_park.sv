// inverse_park: rotating-frame (d, q) stator voltage commands back to the
// stationary (alpha, beta) frame for the modulator:
//   u_alpha = u_sd cos(th) - u_sq sin(th)
//   u_beta  = u_sd sin(th) + u_sq cos(th)
// Voltages are Q10.5 V, cos/sin Q1.14. Timing: a fixed two-stage pipeline,
// outputs follow the inputs by two clocks, no handshake (the block has none
// in the design). Pipeline depth and rounding are this design's choice.
module inverse_park
  import vc_pkg::*;
(
  input  logic    clk,
  input  logic    rst,
  input  sample_t u_sq,
  input  sample_t u_sd,
  input  sample_t sin_th,
  input  sample_t cos_th,
  output sample_t u_salpha,
  output sample_t u_sbeta
);
  logic signed [31:0] p_dc, p_qs, p_ds, p_qc;

  always_ff @(posedge clk) begin
    if (rst) begin
      p_dc <= '0; p_qs <= '0; p_ds <= '0; p_qc <= '0;
      u_salpha <= '0; u_sbeta <= '0;
    end else begin
      p_dc <= u_sd * cos_th;
      p_qs <= u_sq * sin_th;
      p_ds <= u_sd * sin_th;
      p_qc <= u_sq * cos_th;
      u_salpha <= sat16((64'(p_dc) - 64'(p_qs)) >>> FRAC_TRIG);
      u_sbeta  <= sat16((64'(p_ds) + 64'(p_qc)) >>> FRAC_TRIG);
    end
  end
endmodule
