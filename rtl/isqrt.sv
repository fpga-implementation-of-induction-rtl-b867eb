// isqrt: unsigned integer square root, root = floor(sqrt(rad)), for a 2N-bit
// radicand and an N-bit root. Digit-by-digit (restoring) method: each clock
// brings down the next two radicand bits, tries the partial root 4r+1 against
// the partial remainder and fixes one root bit.
// Timing: `start` (ignored while busy) latches rad; `done` is high N+2
// clocks after the clock in which start is high (18 for N=16), with `root`
// valid; root holds until the next result. The controller's
// square root was a vendor CORDIC core; this is this design's own substitute
// with the same function.
module isqrt #(
  parameter int N = 16
) (
  input  logic           clk,
  input  logic           rst,
  input  logic           start,
  input  logic [2*N-1:0] rad,
  output logic [N-1:0]   root,
  output logic           busy,
  output logic           done
);
  localparam int CW = $clog2(N + 1);

  logic [2*N-1:0] rad_r;
  logic [N+2:0]   rem, rem_sh, trial;
  logic [N-1:0]   r;
  logic [CW-1:0]  cnt;

  always_comb begin
    rem_sh = {rem[N:0], rad_r[2*N-1 -: 2]};
    trial  = {1'b0, r, 2'b01};
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      rad_r <= '0; rem <= '0; r <= '0; cnt <= '0;
      busy <= 1'b0; done <= 1'b0; root <= '0;
    end else begin
      done <= 1'b0;
      if (!busy) begin
        if (start) begin
          rad_r <= rad;
          rem   <= '0;
          r     <= '0;
          cnt   <= CW'(N);
          busy  <= 1'b1;
        end
      end else if (cnt != 0) begin
        rad_r <= rad_r << 2;
        if (rem_sh >= trial) begin
          rem <= rem_sh - trial;
          r   <= {r[N-2:0], 1'b1};
        end else begin
          rem <= rem_sh;
          r   <= {r[N-2:0], 1'b0};
        end
        cnt <= cnt - 1'b1;
      end else begin
        busy <= 1'b0;
        done <= 1'b1;
        root <= r;
      end
    end
  end

  // A start while busy is ignored; in this design it is a sequencing error.
  always_ff @(posedge clk) begin
    if (!rst) assert (!(start && busy)) else $error("isqrt: start while busy");
  end
endmodule
