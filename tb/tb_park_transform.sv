// tb_park_transform: random currents and angles. cos/sin are given in Q1.14;
// the expected d/q currents are computed in floating point from the same
// quantised cos/sin and compared two clocks after the inputs, within 2 LSB.
// Inputs are changed every clock, so the check also proves the 2-clock
// pipeline.
module tb_park_transform;
  import vc_pkg::*;
  logic clk = 1'b0, rst = 1'b1;
  sample_t ial, ibe, c, s, id, iq;
  int checks = 0, failures = 0;

  function automatic real rabs(input real x);
    return (x < 0.0) ? -x : x;
  endfunction
  real exp_d [$], exp_q [$];

  park_transform dut (.clk, .rst, .i_salpha(ial), .i_sbeta(ibe), .cos_th(c), .sin_th(s),
                      .i_sd(id), .i_sq(iq));

  always #5 clk = ~clk;

  initial begin
    #200000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    real th, a, b, cr, sr;
    ial = '0; ibe = '0; c = '0; s = '0;
    repeat (3) @(posedge clk);
    rst <= 1'b0;
    @(posedge clk);
    for (int n = 0; n < 1002; n++) begin
      #1;
      if (n >= 2) begin
        real ed, eq;
        ed = exp_d.pop_front(); eq = exp_q.pop_front();
        checks++;
        if (rabs(real'(id)/256.0 - ed) > 2.0/256.0 || rabs(real'(iq)/256.0 - eq) > 2.0/256.0) begin
          failures++;
          $display("mismatch n=%0d got %f %f exp %f %f", n, real'(id)/256.0, real'(iq)/256.0, ed, eq);
        end
      end
      th  = real'($urandom_range(0, 62831)) / 10000.0;
      ial = sample_t'($signed($urandom_range(0, 16384)) - 8192);
      ibe = sample_t'($signed($urandom_range(0, 16384)) - 8192);
      c   = sample_t'(to_q($cos(th), 14));
      s   = sample_t'(to_q($sin(th), 14));
      a = real'(ial)/256.0; b = real'(ibe)/256.0; cr = real'(c)/16384.0; sr = real'(s)/16384.0;
      exp_d.push_back( a*cr + b*sr);
      exp_q.push_back(-a*sr + b*cr);
      @(posedge clk);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
