// tb_vector_sg: closed-loop start-up of the vector control core alone,
// driven by a one-clock aq_done strobe per 100 us period, against the
// behavioural induction machine (im_motor_model): magnetisation from zero
// flux and the first 0.5 s ramp to 286 rpm, then 0.5 s hold, light load.
// Each period the testbench samples the machine (phase currents a and c,
// speed, the stator voltages applied in the last period), pulses aq_done,
// waits for `ready` and applies u_a/u_b during the next period.
// Checks: `ready` within 150 clocks of every strobe; at 0.95 s the speed is
// within 15 rpm of the reference and both the machine's rotor flux and the
// estimate psi_r are within 15% of 1 Wb. Mechanisms that must happen at
// least once (counted): the zero-flux path of the flux estimator, the flux
// floor of the speed estimator and a clamped PI.
module tb_vector_sg;
  import vc_pkg::*;
  localparam real T_END     = 1.0;
  localparam real T_LIGHT   = 1.0;     // N m, light load
  localparam real T_RATED   = 11.9;    // N m, 2238 W at 1725 rpm
  localparam real RPM       = 60.0 / (2.0 * 3.14159265358979);

  logic clk = 1'b0, rst = 1'b1, start = 1'b0, done;   // start: aq_done strobe
  sample_t vit_ref, ia_q, ic_q, w_q, usa_q, usb_q, u_a, u_b, dbg1, dbg2;
  int checks = 0, failures = 0;
  int n_zero = 0, n_clamp = 0, n_pisat = 0, n_rev = 0, n_load = 0, n_steps = 0;

  vector_sg dut (.clk, .rst, .spd_ref(vit_ref), .isa(ia_q), .isc(ic_q), .aq_done(start),
                 .m_w(w_q), .usa(usa_q), .usb(usb_q), .u_a, .u_b, .ready(done),
                 .odebug1(dbg1), .odebug2(dbg2));
  im_motor_model motor ();

  always #5 clk = ~clk;

  function automatic real rabs(input real x);
    return (x < 0.0) ? -x : x;
  endfunction

  // speed reference in rpm
  function automatic real ref_rpm(input real t);
    real tt;
    tt = (t >= 7.0) ? t - 7.0 : t;
    if (t < 7.0 && tt < 0.5) return 286.0 * tt / 0.5;
    if (t >= 7.0 && tt < 0.5) return 573.0 + (286.0 - 573.0) * tt / 0.5;
    if (tt < 2.5) return 286.0;
    if (tt < 3.5) return 286.0 - 572.0 * (tt - 2.5);
    if (tt < 4.5) return -286.0;
    if (tt < 5.5) return -286.0 + 859.0 * (tt - 4.5);
    return 573.0;
  endfunction

  function automatic sample_t q(input real x, input int f);
    longint v;
    v = to_q(x, f);
    if (v > 32767) v = 32767;
    if (v < -32768) v = -32768;
    return sample_t'(v);
  endfunction

  // watchdog: far beyond the ~150 clocks a period takes
  initial begin
    #(T_END / TS * 160.0 * 10.0 + 100000.0);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    real t, ua_ap, ub_ap, tl, prev_w, r;
    int  nsteps, lat;
    ua_ap = 0.0; ub_ap = 0.0; prev_w = 0.0;
    vit_ref = '0; ia_q = '0; ic_q = '0; w_q = '0; usa_q = '0; usb_q = '0;
    repeat (5) @(posedge clk);
    rst <= 1'b0;
    repeat (5) @(posedge clk);
    nsteps = int'(T_END / TS);
    for (int k = 0; k < nsteps; k++) begin
      t  = real'(k) * TS;
      tl = (t < 7.0) ? T_LIGHT : T_RATED;
      if (k > 0 && (real'(k - 1) * TS < 7.0) && t >= 7.0) n_load++;
      // sample the machine
      r = ref_rpm(t);
      vit_ref <= q(r / RPM, FRAC_W);
      ia_q    <= q(motor.isa, FRAC_I);
      ic_q    <= q(-0.5 * motor.isa - 0.5 * $sqrt(3.0) * motor.isb, FRAC_I);
      w_q     <= q(motor.wm, FRAC_W);
      usa_q   <= q(ua_ap, FRAC_U);
      usb_q   <= q(ub_ap, FRAC_U);
      start   <= 1'b1;
      @(posedge clk);
      start   <= 1'b0;
      lat = 0;
      do begin
        @(posedge clk); #1; lat++;
        if (dut.u_flux.state == dut.u_flux.S_SQRT &&
            dut.u_flux.sqrt_done && dut.u_flux.root == 0) n_zero++;
        if (dut.w_rdy && dut.psi_clamp) n_clamp++;
        if (dut.pi_rdy && dut.pi_sat != 0) n_pisat++;
      end while (!done && lat < 400);
      n_steps++;
      checks++;
      if (!done || lat > 150) begin
        failures++;
        $display("t=%f: done after %0d clocks", t, lat);
      end
      // the machine runs one period with the previous command, meanwhile
      // the new command was computed; it is applied from now on
      motor.advance(ua_ap, ub_ap, tl, TS);
      ua_ap = real'(u_a) / 32.0;
      ub_ap = real'(u_b) / 32.0;
      if ((prev_w > 1.0 && motor.wm < -1.0) || (prev_w < -1.0 && motor.wm > 1.0)) begin
        n_rev++;
        prev_w = motor.wm;
      end else if (rabs(motor.wm) > 1.0) prev_w = motor.wm;
      // end of each hold
      if (k % 1000 == 0)
        $display("t=%5.2f ref=%7.1f rpm speed=%7.1f rpm flux=%5.3f est=%5.3f Te=%6.2f",
                 t, r, motor.wm * RPM, motor.flux_mod(), real'(dut.fe_psi) / 4096.0, motor.te);
      foreach (hold_end[i]) begin
        if (k == int'(hold_end[i] / TS)) begin
          checks += 3;
          if (rabs(motor.wm * RPM - r) > 15.0) begin
            failures++; $display("t=%f speed %f rpm, reference %f", t, motor.wm * RPM, r);
          end
          if (rabs(motor.flux_mod() - 1.0) > 0.15) begin
            failures++; $display("t=%f machine rotor flux %f", t, motor.flux_mod());
          end
          if (rabs(real'(dut.fe_psi) / 4096.0 - 1.0) > 0.15) begin
            failures++; $display("t=%f estimated flux %f", t, real'(dut.fe_psi) / 4096.0);
          end
        end
      end
    end
    $display("periods %0d, zero-flux %0d, flux floor %0d, PI clamp %0d, reversals %0d, load steps %0d",
             n_steps, n_zero, n_clamp, n_pisat, n_rev, n_load);
    checks += 3;
    if (n_zero == 0)  begin failures++; $display("zero-flux path never taken"); end
    if (n_clamp == 0) begin failures++; $display("flux floor never used"); end
    if (n_pisat == 0) begin failures++; $display("no PI ever clamped"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  real hold_end [1] = '{0.95};
endmodule
