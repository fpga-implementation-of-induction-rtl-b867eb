// start_edge_detect: turns the external acquisition START level into the
// one-clock aq_done strobe that samples the measurements. START is delayed
// by one clock and compared with its current value; the registered result
// of (delayed START > START) is high for one clock after START falls, i.e.
// when an acquisition has just completed. The delay, the "a>b" comparison
// and its output register follow the design; which comparator input takes
// the delayed signal is read from its diagram.
module start_edge_detect (
  input  logic clk,
  input  logic rst,
  input  logic start,
  output logic aq_done
);
  logic start_d;

  always_ff @(posedge clk) begin
    if (rst) begin
      start_d <= 1'b0;
      aq_done <= 1'b0;
    end else begin
      start_d <= start;
      aq_done <= start_d > start;
    end
  end
endmodule
