// divider: fixed-point division of a signed numerator by an unsigned
// denominator,
//   quo = sat( trunc( num * 2^FRAC / den ) )
// truncated toward zero and saturated to a Q_W-bit signed word; division by
// zero returns the saturated value with the numerator's sign.
// It works as a restoring long division, one quotient bit per clock over the
// NUM_W+FRAC bits of the shifted magnitude |num|*2^FRAC, then restores the
// sign. Timing: `start` (ignored while busy) latches num and den; `done`
// is high NUM_W+FRAC+2 clocks after the clock in which start is high (32
// for 16 bits with 14 fraction bits), with `quo` valid, and quo holds until the
// next result. The controller's divisions were vendor CORDIC cores; this
// radix-2 divider is this design's own substitute with the same function.
module divider #(
  parameter int NUM_W = 32,
  parameter int DEN_W = 16,
  parameter int FRAC  = 0,
  parameter int Q_W   = 16
) (
  input  logic                    clk,
  input  logic                    rst,
  input  logic                    start,
  input  logic signed [NUM_W-1:0] num,
  input  logic        [DEN_W-1:0] den,
  output logic signed [Q_W-1:0]   quo,
  output logic                    busy,
  output logic                    done
);
  localparam int DW  = NUM_W + FRAC;
  localparam int CW  = $clog2(DW + 1);
  localparam logic [DW-1:0] QPOS_MAX = DW'((64'd1 << (Q_W - 1)) - 1);
  localparam logic [DW-1:0] QNEG_MAX = DW'(64'd1 << (Q_W - 1));

  logic [DW-1:0]    dvd, q;
  logic [DEN_W:0]   rem;
  logic [DEN_W-1:0] den_r;
  logic             neg;
  logic [CW-1:0]    cnt;

  logic [NUM_W-1:0] mag;
  logic [DEN_W:0]   rem_sh;

  always_comb begin
    mag    = num[NUM_W-1] ? NUM_W'(-num) : NUM_W'(num);
    rem_sh = {rem[DEN_W-1:0], dvd[DW-1]};
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      dvd <= '0; q <= '0; rem <= '0; den_r <= '0; neg <= 1'b0; cnt <= '0;
      busy <= 1'b0; done <= 1'b0; quo <= '0;
    end else begin
      done <= 1'b0;
      if (!busy) begin
        if (start) begin
          dvd   <= DW'(mag) << FRAC;
          den_r <= den;
          neg   <= num[NUM_W-1];
          rem   <= '0;
          q     <= '0;
          cnt   <= CW'(DW);
          busy  <= 1'b1;
        end
      end else if (cnt != 0) begin
        dvd <= dvd << 1;
        if (rem_sh >= {1'b0, den_r}) begin
          rem <= rem_sh - {1'b0, den_r};
          q   <= {q[DW-2:0], 1'b1};
        end else begin
          rem <= rem_sh;
          q   <= {q[DW-2:0], 1'b0};
        end
        cnt <= cnt - 1'b1;
      end else begin
        busy <= 1'b0;
        done <= 1'b1;
        if (neg) quo <= (q >= QNEG_MAX) ? Q_W'(-QNEG_MAX) : Q_W'(-q);
        else     quo <= (q >= QPOS_MAX) ? Q_W'(QPOS_MAX)  : Q_W'(q);
      end
    end
  end

  // A start while busy is ignored; in this design it is a sequencing error.
  always_ff @(posedge clk) begin
    if (!rst) assert (!(start && busy)) else $error("divider: start while busy");
  end
endmodule
