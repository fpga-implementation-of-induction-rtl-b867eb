// tb_isqrt: random 32-bit radicands (spread over all magnitudes) plus 0, 1,
// perfect squares and the maximum. The root must satisfy
// root^2 <= rad < (root+1)^2, and `done` must come N+1 = 17 clocks after
// start.
module tb_isqrt;
  logic clk = 1'b0, rst = 1'b1, go = 1'b0, done, busy;
  logic [31:0] rad;
  logic [15:0] root;
  int checks = 0, failures = 0;

  isqrt #(.N(16)) dut (.clk, .rst, .start(go), .rad, .root, .busy, .done);

  always #5 clk = ~clk;

  initial begin
    #2000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    rad = '0;
    repeat (3) @(posedge clk);
    rst <= 1'b0;
    @(posedge clk);
    for (int i = 0; i < 1000; i++) begin
      int lat;
      longint r;
      case (i)
        0: rad = 32'd0;
        1: rad = 32'd1;
        2: rad = 32'hffff_ffff;
        3: rad = 32'd4095 * 32'd4095;
        4: rad = 32'd65535 * 32'd65535;
        default: rad = (i % 2) ? ($urandom >> $urandom_range(0, 31)) : $urandom;
      endcase
      go <= 1'b1;
      @(posedge clk);
      go <= 1'b0;
      lat = 0;
      do begin @(posedge clk); #1; lat++; end while (!done && lat < 100);
      r = longint'(root);
      checks += 2;
      if (!(r * r <= longint'(rad) && (r + 1) * (r + 1) > longint'(rad))) begin
        failures++; $display("sqrt(%0d) got %0d", rad, root);
      end
      if (lat != 17) begin failures++; $display("latency %0d", lat); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
