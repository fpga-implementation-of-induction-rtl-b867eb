// tb_w_estimator: random rotor speed, q current and flux (some fluxes below
// the 0.05 Wb floor). Expected synchronous speed in floating point:
//   w = 2 w_r + (Lm/Tr) i_sq / max(psi_r, 0.05)
// checked within 3 LSB (Q11.4) plus 0.5% of the slip term (constant
// rounding) at `ready`, which must come 35 clocks after the clock edge that
// samples start; psi_clamp must report the floor. Both clamp outcomes are
// counted.
module tb_w_estimator;
  import vc_pkg::*;
  logic clk = 1'b0, rst = 1'b1, start = 1'b0, ready, clampf;
  sample_t wr, iq, psi, w;
  int checks = 0, failures = 0, n_clamp = 0;

  function automatic real rabs(input real x);
    return (x < 0.0) ? -x : x;
  endfunction

  w_estimator dut (.clk, .rst, .start, .w_r(wr), .i_sq(iq), .psi_r(psi), .w, .ready,
                   .psi_clamp(clampf));

  always #5 clk = ~clk;

  initial begin
    #2000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    real rwr, riq, rp, ew;
    wr = '0; iq = '0; psi = '0;
    repeat (3) @(posedge clk);
    rst <= 1'b0;
    @(posedge clk);
    for (int n = 0; n < 600; n++) begin
      int lat;
      wr  = sample_t'($signed($urandom_range(0, 3200)) - 1600);     // +/-100 rad/s
      iq  = sample_t'($signed($urandom_range(0, 5120)) - 2560);     // +/-10 A
      psi = (n % 5 == 0) ? sample_t'($urandom_range(0, 300)) : sample_t'($urandom_range(1000, 6000));
      rwr = real'(wr)/16.0; riq = real'(iq)/256.0; rp = real'(psi)/4096.0;
      if (rp < 0.05) rp = 0.05;
      ew = 2.0 * rwr + (LM / TR) * riq / rp;
      if (ew > 2047.9) ew = 2047.9375;
      if (ew < -2048.0) ew = -2048.0;
      start <= 1'b1;
      @(posedge clk);
      start <= 1'b0;
      lat = 0;
      do begin @(posedge clk); #1; lat++; end while (!ready && lat < 100);
      checks += 3;
      if (lat != 35) begin failures++; $display("latency %0d", lat); end
      if (rabs(real'(w)/16.0 - ew) > 3.0/16.0 + 0.005 * rabs(ew - 2.0 * rwr)) begin
        failures++; $display("w got %f exp %f (wr %f iq %f psi %f)", real'(w)/16.0, ew, rwr, riq, rp);
      end
      if (clampf !== (real'(psi)/4096.0 < 0.05 - 1.0/8192.0) && rabs(real'(psi)/4096.0 - 0.05) > 1.0/4096.0) begin
        failures++; $display("psi_clamp %0b for psi %f", clampf, real'(psi)/4096.0);
      end
      if (clampf) n_clamp++;
    end
    checks++;
    if (n_clamp == 0 || n_clamp == 600) failures++;
    $display("clamped: %0d", n_clamp);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
