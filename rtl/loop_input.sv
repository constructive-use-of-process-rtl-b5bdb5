// loop_input: the entry of one measurement loop. A mode MUX picks either the
// external pulse (mux_sel = 1) or the path's own output fed back (mux_sel = 0).
// Reset gate 1 sits on the feedback wire and reset gate 2 after the MUX; each
// forces its signal low while its reset is high, which kills a pulse still
// circulating when the mode changes. The MUX and the positions of the two reset
// gates follow the measurement schematic; the gates are drawn there only as boxes,
// so "force low while reset is high" is this design's reading of their function.
// Purely combinational; in the feedback configuration it closes a loop through the
// delay path, which is the intended oscillator.
module loop_input (
  input  logic pulse_in,
  input  logic fb,
  input  logic mux_sel,  // 1: pulse input, 0: feedback
  input  logic rst1,     // reset gate on the feedback
  input  logic rst2,     // reset gate after the MUX
  output logic y
);
  timeunit 1ns;
  timeprecision 1fs;

  logic fb_g;
  logic m;

  always_comb begin
    fb_g = fb & ~rst1;
    m    = mux_sel ? pulse_in : fb_g;
    y    = m & ~rst2;
  end
endmodule
