// tb_clarke_transform: random phase currents a and c; the expected alpha/beta
// currents are computed in floating point from i_b = -i_a - i_c,
//   alpha = i_a, beta = (i_b - i_c)/sqrt(3),
// and compared with the output one clock later, within 2 LSB (Q7.8).
module tb_clarke_transform;
  import vc_pkg::*;
  logic clk = 1'b0, rst = 1'b1;
  sample_t ia, ic, ial, ibe;
  int checks = 0, failures = 0;

  function automatic real rabs(input real x);
    return (x < 0.0) ? -x : x;
  endfunction

  clarke_transform dut (.clk, .rst, .i_sa(ia), .i_sc(ic), .i_salpha(ial), .i_sbeta(ibe));

  always #5 clk = ~clk;

  initial begin
    #200000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    real a, c, b, exp_al, exp_be;
    ia = '0; ic = '0;
    repeat (3) @(posedge clk);
    rst <= 1'b0;
    for (int n = 0; n < 1000; n++) begin
      // balanced-ish currents within +/-40 A so that beta does not saturate
      ia = sample_t'($signed($urandom_range(0, 20480)) - 10240);
      ic = sample_t'($signed($urandom_range(0, 20480)) - 10240);
      a = real'(ia) / 256.0; c = real'(ic) / 256.0; b = -a - c;
      exp_al = a;
      exp_be = (b - c) / $sqrt(3.0);
      @(posedge clk); #1;
      checks++;
      if (rabs(real'(ial) / 256.0 - exp_al) > 2.0/256.0 ||
          rabs(real'(ibe) / 256.0 - exp_be) > 2.0/256.0) begin
        failures++;
        $display("mismatch: a=%f c=%f got %f %f exp %f %f", a, c,
                 real'(ial)/256.0, real'(ibe)/256.0, exp_al, exp_be);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
