// tb_pi_controller: a PI with IN_FRAC=8, OUT_FRAC=5, KP=2, KI=0.1, LIM=50 is
// started every 6 clocks with random reference/feedback pairs, sometimes
// left idle. A floating-point model (integrator clamped to +/-LIM, output
// clamped to +/-LIM) predicts the output, which is checked 2 clocks after
// start within 2 LSB; while the PI is not started its output must not move.
// The run includes long stretches of one-signed error, so the clamp and the
// sat_o flag are exercised; their occurrence is counted.
module tb_pi_controller;
  import vc_pkg::*;
  localparam real KP = 2.0, KI = 0.1, LIM = 50.0;
  logic clk = 1'b0, rst = 1'b1, start = 1'b0, sat;
  sample_t r, f, y;
  int checks = 0, failures = 0, n_sat = 0;

  function automatic real rabs(input real x);
    return (x < 0.0) ? -x : x;
  endfunction
  function automatic real clamp(input real x, input real l);
    return (x > l) ? l : ((x < -l) ? -l : x);
  endfunction

  pi_controller #(.IN_FRAC(8), .OUT_FRAC(5), .KP(KP), .KI(KI), .LIM(LIM)) dut (
    .clk, .rst, .start, .ref_i(r), .fb_i(f), .out_o(y), .sat_o(sat));

  always #5 clk = ~clk;

  initial begin
    #500000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    real integ, e, expo, held;
    bit  exp_sat;
    integ = 0.0;
    r = '0; f = '0;
    repeat (3) @(posedge clk);
    rst <= 1'b0;
    @(posedge clk);
    for (int n = 0; n < 1500; n++) begin
      bit go;
      go = ($urandom % 5) != 0;
      if ((n / 200) % 2 == 1) begin
        // a stretch with positive error: drives the integrator into the clamp
        r = sample_t'($urandom_range(0, 2000));
        f = sample_t'(-$signed($urandom_range(0, 500)));
      end else begin
        r = sample_t'($signed($urandom_range(0, 4000)) - 2000);
        f = sample_t'($signed($urandom_range(0, 4000)) - 2000);
      end
      held = real'(y) / 32.0;
      start <= go;
      @(posedge clk);
      start <= 1'b0;
      #1;
      // one clock after start the output must not have changed yet
      checks++;
      if (real'(y) / 32.0 != held) begin
        failures++;
        $display("output changed after 1 clock at n=%0d", n);
      end
      @(posedge clk); #1;
      if (go) begin
        e = (real'(r) - real'(f)) / 256.0;
        // clearly beyond the limit (coefficient rounding aside)
        exp_sat = (rabs(integ + KI * e) > LIM + 0.07);
        integ = clamp(integ + KI * e, LIM);
        exp_sat = exp_sat || (rabs(KP * e + integ) > LIM + 0.07);
        expo = clamp(KP * e + integ, LIM);
        checks++;
        if (rabs(real'(y) / 32.0 - expo) > 2.0 / 32.0) begin
          failures++;
          $display("n=%0d e=%f got %f exp %f", n, e, real'(y)/32.0, expo);
        end
        if (exp_sat) begin
          n_sat++;
          checks++;
          if (!sat) begin failures++; $display("sat_o missing at n=%0d e=%f integ=%f y=%f", n, e, integ, real'(y)/32.0); end
        end
      end else begin
        checks++;
        if (real'(y) / 32.0 != held) begin
          failures++;
          $display("output moved without start at n=%0d", n);
        end
      end
      repeat (4) @(posedge clk);
    end
    checks++;
    if (n_sat == 0) begin failures++; $display("clamp never reached"); end
    $display("clamped samples: %0d", n_sat);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
