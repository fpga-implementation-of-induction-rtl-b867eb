// tb_divider: the divider in the configuration used for cos/sin
// (16-bit numerator, 16-bit denominator, 14 fraction bits, 16-bit quotient)
// and in the one used by the speed estimator (32-bit numerator, no fraction
// bits). Random operands plus edge cases (most negative numerator, zero and
// unit denominators). Expected: trunc(|num| * 2^FRAC / den) with the sign of
// num, saturated to 16 bits; den = 0 gives the saturated value. The latency
// (done NUM_W+FRAC+1 clocks after start) is checked as well.
module tb_divider;
  logic clk = 1'b0, rst = 1'b1;
  logic go;
  logic signed [15:0] n16, q16, q32;
  logic signed [31:0] n32;
  logic [15:0] d;
  logic done16, done32, busy16, busy32;
  int checks = 0, failures = 0;

  divider #(.NUM_W(16), .DEN_W(16), .FRAC(14), .Q_W(16)) dut16 (
    .clk, .rst, .start(go), .num(n16), .den(d), .quo(q16), .busy(busy16), .done(done16));
  divider #(.NUM_W(32), .DEN_W(16), .FRAC(0), .Q_W(16)) dut32 (
    .clk, .rst, .start(go), .num(n32), .den(d), .quo(q32), .busy(busy32), .done(done32));

  always #5 clk = ~clk;

  function automatic longint expect_q(input longint num, input longint den, input int frac);
    longint mag, q;
    mag = (num < 0) ? -num : num;
    if (den == 0) q = 64'sd1 << 40;
    else          q = (mag << frac) / den;
    if (num < 0) return (q > 32768) ? -32768 : -q;
    else         return (q > 32767) ?  32767 :  q;
  endfunction

  initial begin
    #2000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    go = 1'b0; n16 = '0; n32 = '0; d = '0;
    repeat (3) @(posedge clk);
    rst <= 1'b0;
    @(posedge clk);
    for (int i = 0; i < 600; i++) begin
      int lat16, lat32;
      bit got16, got32;
      case (i)
        0: begin n16 = -16'sd32768; d = 16'd1;     n32 = -32'sd2147483648; end
        1: begin n16 = 16'sd1000;   d = 16'd0;     n32 = -32'sd5;          end
        2: begin n16 = 16'sd4096;   d = 16'd4096;  n32 = 32'sd65536;       end
        3: begin n16 = -16'sd3000;  d = 16'd4096;  n32 = -32'sd65536;      end
        default: begin
          d   = 16'($urandom_range(1, 65535));
          n16 = 16'($urandom);
          n32 = 32'($urandom) >>> $urandom_range(0, 30);
          if (i % 3 == 0) begin   // |num| <= den, as for cos/sin
            d   = 16'($urandom_range(1, 32767));
            n16 = 16'($signed($urandom_range(0, 2 * d)) - d);
          end
        end
      endcase
      go <= 1'b1;
      @(posedge clk);
      go <= 1'b0;
      lat16 = 0; lat32 = 0; got16 = 0; got32 = 0;
      while (!(got16 && got32)) begin
        @(posedge clk); #1;
        if (!got16) lat16++;
        if (!got32) lat32++;
        if (done16) got16 = 1;
        if (done32) got32 = 1;
        if (lat16 > 100) break;
      end
      checks += 4;
      if (longint'(q16) != expect_q(longint'(n16), longint'(d), 14)) begin
        failures++; $display("16: %0d/%0d got %0d exp %0d", n16, d, q16, expect_q(n16, d, 14));
      end
      if (longint'(q32) != expect_q(longint'(n32), longint'(d), 0)) begin
        failures++; $display("32: %0d/%0d got %0d exp %0d", n32, d, q32, expect_q(n32, d, 0));
      end
      if (lat16 != 31) begin failures++; $display("latency16 %0d", lat16); end
      if (lat32 != 33) begin failures++; $display("latency32 %0d", lat32); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
