// clarke_transform: three-phase stator currents to the stationary (alpha,
// beta) frame. Only phases a and c are measured; with a three-wire machine
// i_b = -i_a - i_c, so
//   i_alpha = i_a
//   i_beta  = (i_b - i_c)/sqrt(3) = -(i_a + 2 i_c)/sqrt(3)
// 1/sqrt(3) is held as 37837/2^16. Inputs and outputs are Q7.8 amperes.
// Timing: one register stage, outputs valid one clock after the inputs.
// The block and its a/c inputs follow the design; the arithmetic is the
// textbook Clarke transform and the single pipeline stage is this design's
// choice.
module clarke_transform
  import vc_pkg::*;
(
  input  logic    clk,
  input  logic    rst,
  input  sample_t i_sa,
  input  sample_t i_sc,
  output sample_t i_salpha,
  output sample_t i_sbeta
);
  localparam longint INV_SQRT3_Q = to_q(1.0 / $sqrt(3.0), K_FRAC);

  logic signed [63:0] sum_ac, beta_w;

  always_comb begin
    sum_ac = 64'(i_sa) + 2 * 64'(i_sc);
    beta_w = -((sum_ac * INV_SQRT3_Q) >>> K_FRAC);
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      i_salpha <= '0;
      i_sbeta  <= '0;
    end else begin
      i_salpha <= i_sa;
      i_sbeta  <= sat16(beta_w);
    end
  end
endmodule
