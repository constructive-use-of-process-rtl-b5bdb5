// dl_stage: BEHAVIOURAL MODEL (not synthesizable) of one MUX stage of the delay
// line. On silicon the stage is a LUT6 used as a 2:1 MUX whose two data inputs are
// both tied to the previous stage's output, so the logic value simply passes
// through; what the select bit changes is which channel, and so which delay, an
// edge takes. The three fine-tuning bits on I3..I5 likewise pick one of eight
// branches of the LUT tree and add a small delay of their own. Delay differences
// between stages come from process variation; here dl_pkg::stage_delay_fs() draws
// them from a hash of (SEED, PATH, IDX), so each instance is one "fabricated"
// stage with fixed channel delays.
// The logic value is computed by lut6_mux; the output follows it after the delay
// of the channel and tuning path selected at the moment the input changes
// (transport delay, so pulses of any width pass). Changing sel or tune while no
// edge is in flight does not disturb the output, as with a real MUX whose two
// inputs carry the same signal.
// Ports: in (previous stage), sel (path-selecting bit s^i), tune (programmable
// bits I5..I3 as tune[2:0]), out. Time unit 1 ns, precision 1 fs.
// The lint note that the delay value is not known statically stands: it is
// computed per edge and is never below a few hundred ps.
module dl_stage #(
  parameter int unsigned SEED = 1,
  parameter int unsigned PATH = 0,  // 0: top path, 1: bottom path
  parameter int unsigned IDX  = 0   // stage index along the path
) (
  input  logic                      in,
  input  logic                      sel,
  input  logic [dl_pkg::TUNE_W-1:0] tune,
  output logic                      out
);
  timeunit 1ns;
  timeprecision 1fs;

  logic v;

  // I0 = channel 0, I1 = channel 1, I2 = select, I3..I5 = tuning bits.
  lut6_mux u_lut (.i({tune, sel, in, in}), .o(v));

  initial out = 1'b0;

  always @(v) begin
    out <= #(real'(dl_pkg::stage_delay_fs(SEED, PATH, IDX, sel, tune)) / 1.0e6) v;
  end
endmodule
