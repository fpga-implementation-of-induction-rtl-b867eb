// tb_decoupling: random PI voltages, currents, synchronous speed and flux.
// Expected outputs from the decoupling equations in floating point with the
// machine constants sigma*Ls and Lm/Lr of vc_pkg:
//   u_sd = v_sd - w sigmaLs i_sq,  u_sq = v_sq + w sigmaLs i_sd + w (Lm/Lr) psi_r
// checked within 3 LSB (Q10.5) plus 0.5% of the compensation terms (the
// constants are held with 16 fraction bits) when `ready` comes, which must be 3 clocks
// after the clock edge that samples start.
module tb_decoupling;
  import vc_pkg::*;
  logic clk = 1'b0, rst = 1'b1, start = 1'b0, ready;
  sample_t vq, vd, iq, id, w, psi, uq, ud;
  int checks = 0, failures = 0;

  function automatic real rabs(input real x);
    return (x < 0.0) ? -x : x;
  endfunction

  decoupling dut (.clk, .rst, .start, .v_sq(vq), .v_sd(vd), .i_sq(iq), .i_sd(id),
                  .w, .psi_r(psi), .u_sq(uq), .u_sd(ud), .ready);

  always #5 clk = ~clk;

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    real rvq, rvd, riq, rid, rw, rp, eq, ed;
    vq = '0; vd = '0; iq = '0; id = '0; w = '0; psi = '0;
    repeat (3) @(posedge clk);
    rst <= 1'b0;
    @(posedge clk);
    for (int n = 0; n < 1000; n++) begin
      int lat;
      vq  = sample_t'($signed($urandom_range(0, 12800)) - 6400);    // +/-200 V
      vd  = sample_t'($signed($urandom_range(0, 12800)) - 6400);
      iq  = sample_t'($signed($urandom_range(0, 10240)) - 5120);    // +/-20 A
      id  = sample_t'($signed($urandom_range(0, 10240)) - 5120);
      w   = sample_t'($signed($urandom_range(0, 12800)) - 6400);    // +/-400 rad/s
      psi = sample_t'($urandom_range(0, 6144));                     // 0..1.5 Wb
      rvq = real'(vq)/32.0; rvd = real'(vd)/32.0; riq = real'(iq)/256.0; rid = real'(id)/256.0;
      rw = real'(w)/16.0; rp = real'(psi)/4096.0;
      ed = rvd - rw * SIGMA * LS * riq;
      eq = rvq + rw * SIGMA * LS * rid + rw * (LM / LR) * rp;
      start <= 1'b1;
      @(posedge clk);
      start <= 1'b0;
      lat = 0;
      do begin @(posedge clk); #1; lat++; end while (!ready && lat < 20);
      checks += 3;
      if (lat != 3) begin failures++; $display("latency %0d", lat); end
      if (rabs(real'(ud)/32.0 - ed) > 3.0/32.0 + 0.005 * rabs(ed - rvd)) begin
        failures++; $display("u_sd got %f exp %f", real'(ud)/32.0, ed);
      end
      if (rabs(real'(uq)/32.0 - eq) > 3.0/32.0 + 0.005 * rabs(eq - rvq)) begin
        failures++; $display("u_sq got %f exp %f", real'(uq)/32.0, eq);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
