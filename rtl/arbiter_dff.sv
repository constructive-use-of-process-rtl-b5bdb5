// arbiter_dff: the D flip-flop that turns the race between the two delay-line
// outputs into the checking bit cb. out_t drives D and out_b drives the clock, as
// drawn in the delay-line schematic: when the bottom edge arrives, cb takes the
// level of the top output, so cb = 1 when the top edge arrived first (the time
// difference t_out = arrival(out_b) - arrival(out_t) is positive) and cb = 0 when
// it arrived last. The asynchronous active-high reset clearing cb before each
// launch is this design's addition. Setup/hold metastability of a near-tie is not
// modelled.
module arbiter_dff (
  input  logic out_t,   // D input
  input  logic out_b,   // clock input
  input  logic rst,     // asynchronous clear, active high
  output logic cb
);
  timeunit 1ns;
  timeprecision 1fs;

  always_ff @(posedge out_b or posedge rst) begin
    if (rst) cb <= 1'b0;
    else     cb <= out_t;
  end
endmodule
