// tb_pi_subsystem: the four PIs with their default gains, started once per
// simulated control sample. The inputs are changed to random junk right after
// each START, so the check also proves they were captured on START.
// A floating-point model of the cascade (speed and flux PIs, outputs
// truncated to Q7.8 amperes, then the two current PIs; every integrator and
// output clamped) predicts v_sq and v_sd, checked within 6 LSB (Q10.5) when
// READY comes, which must be 11 clocks after the START clock.
// Saturation of the outer PIs happens in the first samples (zero flux) and
// is counted.
module tb_pi_subsystem;
  import vc_pkg::*;
  logic clk = 1'b0, rst = 1'b1, start = 1'b0, ready;
  sample_t spd, wr, fref, psi, iq, id, vq, vd;
  logic [3:0] satv;
  int checks = 0, failures = 0, n_sat = 0;

  function automatic real rabs(input real x);
    return (x < 0.0) ? -x : x;
  endfunction
  function automatic real clamp(input real x, input real l);
    return (x > l) ? l : ((x < -l) ? -l : x);
  endfunction
  function automatic real q8(input real x);   // truncation to Q7.8
    return $floor(x * 256.0) / 256.0;
  endfunction

  pi_subsystem dut (.clk, .rst, .start, .spd_ref(spd), .w_r(wr), .flux_ref(fref),
                    .psi_r(psi), .i_sq(iq), .i_sd(id), .v_sq(vq), .v_sd(vd),
                    .ready, .sat_o(satv));

  always #5 clk = ~clk;

  initial begin
    #2000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    real is_, if_, iq_, id_, e, isq_ref, isd_ref, evq, evd;
    real rspd, rwr, rpsi, riq, rid;
    is_ = 0.0; if_ = 0.0; iq_ = 0.0; id_ = 0.0;
    fref = sample_t'(4096);
    spd = '0; wr = '0; psi = '0; iq = '0; id = '0;
    repeat (3) @(posedge clk);
    rst <= 1'b0;
    @(posedge clk);
    for (int n = 0; n < 400; n++) begin
      int lat;
      spd = sample_t'($signed($urandom_range(0, 1600)) - 800);           // +/-50 rad/s
      wr  = sample_t'(int'(spd) + $signed($urandom_range(0, 160)) - 80);  // within 5 rad/s
      psi = (n < 5) ? sample_t'(0) : sample_t'($urandom_range(3700, 4500));
      iq  = sample_t'($signed($urandom_range(0, 5120)) - 2560);
      id  = sample_t'($signed($urandom_range(0, 5120)) - 2560);
      rspd = real'(spd)/16.0; rwr = real'(wr)/16.0; rpsi = real'(psi)/4096.0;
      riq = real'(iq)/256.0; rid = real'(id)/256.0;
      e = rspd - rwr;  is_ = clamp(is_ + 0.004 * e, 20.0); isq_ref = q8(clamp(2.0 * e + is_, 20.0));
      e = 1.0 - rpsi;  if_ = clamp(if_ + 0.3 * e, 20.0);   isd_ref = q8(clamp(40.0 * e + if_, 20.0));
      e = isq_ref - riq; iq_ = clamp(iq_ + 0.2 * e, 300.0); evq = clamp(8.0 * e + iq_, 300.0);
      e = isd_ref - rid; id_ = clamp(id_ + 0.2 * e, 300.0); evd = clamp(8.0 * e + id_, 300.0);
      start <= 1'b1;
      @(posedge clk);
      start <= 1'b0;
      #1;
      // junk on the inputs after START
      spd = sample_t'($urandom); wr = sample_t'($urandom); psi = sample_t'($urandom);
      iq = sample_t'($urandom); id = sample_t'($urandom);
      lat = 2;   // cycle index, relative to the START cycle, seen after the next edge
      while (lat < 40) begin
        @(posedge clk); #1;
        if (satv[1:0] != 2'b00) n_sat++;
        if (ready) break;
        lat++;
      end
      checks += 3;
      if (lat != 11) begin failures++; $display("READY after %0d clocks", lat); end
      if (rabs(real'(vq)/32.0 - evq) > 6.0/32.0) begin
        failures++; $display("n=%0d v_sq got %f exp %f", n, real'(vq)/32.0, evq);
      end
      if (rabs(real'(vd)/32.0 - evd) > 6.0/32.0) begin
        failures++; $display("n=%0d v_sd got %f exp %f", n, real'(vd)/32.0, evd);
      end
      repeat (3) @(posedge clk);
    end
    checks++;
    if (n_sat == 0) begin failures++; $display("outer PI never clamped"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
