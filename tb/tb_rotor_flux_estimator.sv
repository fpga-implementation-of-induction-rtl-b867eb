// tb_rotor_flux_estimator: feeds one and a half periods of 60 Hz stator
// voltages (150 V) and currents (6 A, lagging) sampled every 100 us, after
// two all-zero samples. A floating-point voltage model with the vc_pkg
// machine constants integrates the same quantised samples:
//   psi_s += Ts (u - Rs i);  psi_r = (Lr/Lm)(psi_s - sigmaLs i)
// and predicts |psi_r| (within 4 LSB + 0.3%), cos/sin of its angle (within 3 flux LSB / |psi_r| +
// 16 LSB of Q1.14) and the stator flux debug outputs (3 LSB + 0.2%).
// The zero-flux samples must give cos=1, sin=0 (counted). READY must come
// 56 clocks after the START clock (earlier for zero flux).
module tb_rotor_flux_estimator;
  import vc_pkg::*;
  logic clk = 1'b0, rst = 1'b1, start = 1'b0, ready;
  sample_t ua, ub, ia, ib, c, s, psi, dsa, dsb;
  int checks = 0, failures = 0, n_zero = 0;

  function automatic real rabs(input real x);
    return (x < 0.0) ? -x : x;
  endfunction

  rotor_flux_estimator dut (.clk, .rst, .start, .u_sa(ua), .u_sb(ub), .i_sa(ia), .i_sb(ib),
                            .cos_th(c), .sin_th(s), .psi_r(psi),
                            .db_psy_sa(dsa), .db_psy_sb(dsb), .ready);

  always #5 clk = ~clk;

  initial begin
    #2000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    real psa, psb, pra, prb, m, th, rua, rub, ria, rib;
    psa = 0.0; psb = 0.0;
    ua = '0; ub = '0; ia = '0; ib = '0;
    repeat (3) @(posedge clk);
    rst <= 1'b0;
    @(posedge clk);
    for (int n = 0; n < 252; n++) begin
      int lat;
      th = 2.0 * 3.14159265358979 * 60.0 * TS * real'(n - 2);
      if (n < 2) begin
        ua = '0; ub = '0; ia = '0; ib = '0;
      end else begin
        ua = sample_t'(to_q(150.0 * $cos(th), FRAC_U));
        ub = sample_t'(to_q(150.0 * $sin(th), FRAC_U));
        ia = sample_t'(to_q(6.0 * $cos(th - 0.5), FRAC_I));
        ib = sample_t'(to_q(6.0 * $sin(th - 0.5), FRAC_I));
      end
      rua = real'(ua)/32.0; rub = real'(ub)/32.0; ria = real'(ia)/256.0; rib = real'(ib)/256.0;
      psa = psa + TS * (rua - RS * ria);
      psb = psb + TS * (rub - RS * rib);
      pra = (LR / LM) * (psa - SIGMA * LS * ria);
      prb = (LR / LM) * (psb - SIGMA * LS * rib);
      m = $sqrt(pra * pra + prb * prb);
      start <= 1'b1;
      @(posedge clk);
      start <= 1'b0;
      lat = 2;
      while (lat < 200) begin
        @(posedge clk); #1;
        if (ready) break;
        lat++;
      end
      if (n < 2) begin
        checks += 3;
        if (c != 16384 || s != 0) begin failures++; $display("zero flux: cos %0d sin %0d", c, s); end
        if (psi != 0) begin failures++; $display("zero flux: psi %0d", psi); end
        if (lat >= 56) begin failures++; $display("zero-flux latency %0d", lat); end
        n_zero++;
      end else begin
        checks += 6;
        if (lat != 56) begin failures++; $display("latency %0d", lat); end
        if (rabs(real'(psi)/4096.0 - m) > 4.0/4096.0 + 0.003 * m) begin
          failures++; $display("n=%0d psi got %f exp %f", n, real'(psi)/4096.0, m);
        end
        if (rabs(real'(c)/16384.0 - pra/m) > 16.0/16384.0 + 3.0/4096.0/m) begin
          failures++; $display("n=%0d cos got %f exp %f", n, real'(c)/16384.0, pra/m);
        end
        if (rabs(real'(s)/16384.0 - prb/m) > 16.0/16384.0 + 3.0/4096.0/m) begin
          failures++; $display("n=%0d sin got %f exp %f", n, real'(s)/16384.0, prb/m);
        end
        if (rabs(real'(dsa)/4096.0 - psa) > 3.0/4096.0 + 0.002 * rabs(psa)) begin
          failures++; $display("n=%0d psi_sa got %f exp %f", n, real'(dsa)/4096.0, psa);
        end
        if (rabs(real'(dsb)/4096.0 - psb) > 3.0/4096.0 + 0.002 * rabs(psb)) begin
          failures++; $display("n=%0d psi_sb got %f exp %f", n, real'(dsb)/4096.0, psb);
        end
      end
      repeat (5) @(posedge clk);
    end
    checks++;
    if (n_zero != 2) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
