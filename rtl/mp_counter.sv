// mp_counter: high-frequency edge counter of one measurement loop. Four
// flip-flops, each sampling on both edges of its own 250 MHz clock, see the loop
// signal eight times per 4 ns period; with the four clocks spaced by an eighth of
// a period this is an equivalent 2 GHz sampling clock. Each dual-edge flip-flop is
// written as a rising-edge and a falling-edge register. At every rising edge of
// clk[0] the eight samples of the previous period are taken into the clk[0]
// domain in time order (clk[0..3] rising, then clk[0..3] falling), the 0->1
// transitions among them (including the one from the last sample of the period
// before) are counted, and, while en is high, added to count. One rising edge is
// one pass of the circulating pulse, so count is the number of passes during the
// measurement window. The loop signal must stay high and low for at least 0.5 ns
// each to be seen.
// The four phase-shifted clocks, their dual-edge use and the 2 GHz equivalent rate
// follow the prototype; how the samples are combined into a count, and the count
// width, are this design's choices. clear (synchronous, clk[0]) zeroes count;
// count is held while en is low. sig is asynchronous to all clocks; on silicon the
// sampling registers are also the synchronizers.
module mp_counter #(
  parameter int unsigned CNT_W = 16
) (
  input  logic [3:0]       clk,    // four 250 MHz phases; clk[0] is the output domain
  input  logic             rst,    // synchronous to clk[0], active high
  input  logic             sig,    // loop signal to count
  input  logic             clear,
  input  logic             en,
  output logic [CNT_W-1:0] count
);
  timeunit 1ns;
  timeprecision 1fs;

  logic [3:0] samp_p;   // samples on rising edges of clk[0..3]
  logic [3:0] samp_n;   // samples on falling edges of clk[0..3]
  logic [7:0] rise;     // rise[k]: sample k is 1 and the sample before it 0
  logic [7:0] win;      // one clock period of samples, oldest in bit 0
  logic       last;     // newest sample of the period before
  logic [3:0] rises;

  for (genvar g = 0; g < 4; g++) begin : g_ph
    logic q_p, q_n;
    always_ff @(posedge clk[g]) q_p <= sig;
    always_ff @(negedge clk[g]) q_n <= sig;
    assign samp_p[g] = q_p;
    assign samp_n[g] = q_n;
  end

  always_comb begin
    win     = {samp_n, samp_p};
    rise[0] = win[0] & ~last;
    for (int k = 1; k < 8; k++) rise[k] = win[k] & ~win[k-1];
    rises = 4'd0;
    for (int k = 0; k < 8; k++) rises = rises + {3'b000, rise[k]};
  end

  always_ff @(posedge clk[0]) begin
    if (rst) begin
      last  <= 1'b0;
      count <= '0;
    end else begin
      last <= win[7];
      if (clear)   count <= '0;
      else if (en) count <= count + CNT_W'(rises);
    end
  end
endmodule
