// lut6_mux: a 6-input look-up table built as the binary mux tree of an FPGA LUT6.
// The output is INIT[{I5,I4,I3,I2,I1,I0}]. The first tree levels are selected by
// I0, I1 and I2 and the last three by I3, I4 and I5, with I5 driving the output
// multiplexer. With the default INIT (dl_pkg::mux_lut_init) the LUT is a 2:1 MUX:
// I0 is channel 0, I1 is channel 1 and I2 the select, and I3..I5 are the
// programmable "fine tuning" bits: every value of them gives the same logic
// function but routes the edge through a different branch of the tree, which on
// silicon has a slightly different delay. Which of I0..I2 carries the select is
// this design's choice; the tree shape and the use of I3..I5 as programmable bits
// follow the LUT6 structure of the prototype. Purely combinational.
module lut6_mux #(
  parameter logic [63:0] INIT = dl_pkg::mux_lut_init()
) (
  input  logic [5:0] i,
  output logic       o
);
  timeunit 1ns;
  timeprecision 1fs;

  logic [31:0] l1;
  logic [15:0] l2;
  logic [7:0]  l3;
  logic [3:0]  l4;
  logic [1:0]  l5;

  always_comb begin
    for (int k = 0; k < 32; k++) l1[k] = i[0] ? INIT[2*k+1] : INIT[2*k];
    for (int k = 0; k < 16; k++) l2[k] = i[1] ? l1[2*k+1] : l1[2*k];
    for (int k = 0; k < 8; k++)  l3[k] = i[2] ? l2[2*k+1] : l2[2*k];
    for (int k = 0; k < 4; k++)  l4[k] = i[3] ? l3[2*k+1] : l3[2*k];
    for (int k = 0; k < 2; k++)  l5[k] = i[4] ? l4[2*k+1] : l4[2*k];
    o = i[5] ? l5[1] : l5[0];
  end
endmodule
