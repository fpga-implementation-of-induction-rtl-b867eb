// tb_inverse_park: random d/q voltages and angles. cos/sin are given in Q1.14;
// the expected alpha/beta voltages are computed in floating point from the
// same quantised cos/sin and compared two clocks after the inputs, within
// 2 LSB (Q10.5). Inputs change every clock, so the 2-clock pipeline is
// checked too.
module tb_inverse_park;
  import vc_pkg::*;
  logic clk = 1'b0, rst = 1'b1;
  sample_t uq, ud, c, s, ual, ube;
  int checks = 0, failures = 0;

  function automatic real rabs(input real x);
    return (x < 0.0) ? -x : x;
  endfunction
  real exp_a [$], exp_b [$];

  inverse_park dut (.clk, .rst, .u_sq(uq), .u_sd(ud), .sin_th(s), .cos_th(c),
                    .u_salpha(ual), .u_sbeta(ube));

  always #5 clk = ~clk;

  initial begin
    #200000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    real th, q, d, cr, sr;
    uq = '0; ud = '0; c = '0; s = '0;
    repeat (3) @(posedge clk);
    rst <= 1'b0;
    @(posedge clk);
    for (int n = 0; n < 1002; n++) begin
      #1;
      if (n >= 2) begin
        real ea, eb;
        ea = exp_a.pop_front(); eb = exp_b.pop_front();
        checks++;
        if (rabs(real'(ual)/32.0 - ea) > 2.0/32.0 || rabs(real'(ube)/32.0 - eb) > 2.0/32.0) begin
          failures++;
          $display("mismatch n=%0d got %f %f exp %f %f", n, real'(ual)/32.0, real'(ube)/32.0, ea, eb);
        end
      end
      th = real'($urandom_range(0, 62831)) / 10000.0;
      uq = sample_t'($signed($urandom_range(0, 20000)) - 10000);
      ud = sample_t'($signed($urandom_range(0, 20000)) - 10000);
      c  = sample_t'(to_q($cos(th), 14));
      s  = sample_t'(to_q($sin(th), 14));
      q = real'(uq)/32.0; d = real'(ud)/32.0; cr = real'(c)/16384.0; sr = real'(s)/16384.0;
      exp_a.push_back(d*cr - q*sr);
      exp_b.push_back(d*sr + q*cr);
      @(posedge clk);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
