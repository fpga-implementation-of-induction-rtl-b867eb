// tb_start_edge_detect: drives a random START level and checks that aq_done
// is high exactly after the clock edge that sees START low following a high,
// i.e. aq_done after edge n = START(n-1) & !START(n), and never otherwise.
module tb_start_edge_detect;
  logic clk = 1'b0, rst = 1'b1, start = 1'b0, aq_done;
  int checks = 0, failures = 0, pulses = 0;
  logic [2:0] hist = '0;   // start values of the last clocks

  start_edge_detect dut (.clk, .rst, .start, .aq_done);

  always #5 clk = ~clk;

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3) @(posedge clk);
    rst <= 1'b0;
    for (int n = 0; n < 2000; n++) begin
      @(posedge clk);
      #1;
      // hist[0] = START sampled at the edge just passed, hist[1] the one before
      hist = {hist[1:0], start};
      if (n >= 2) begin
        checks++;
        if (aq_done !== (hist[1] & ~hist[0])) begin
          failures++;
          $display("mismatch at %0d: aq_done=%0b hist=%b", n, aq_done, hist);
        end
        if (aq_done) pulses++;
      end
      start <= ($urandom % 4) != 0 ? start : ~start;
    end
    checks++;
    if (pulses < 10) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
