// delay_line_core: the process-variation delay line. Two N-stage MUX paths, top and
// bottom, each with its own path-selecting vector (s_t, s_b) and fine-tuning bits,
// feed the checking-bit flip-flop (out_t on D, out_b on the clock). When one pulse
// enters both paths, cb tells which path was faster for the chosen selection; the
// difference of the two arrival times is the generated delay, set in sub-ps steps
// by picking the select vectors. The two inputs are separate so that the
// measurement structure can put a loop around each path; tie them together for
// the plain delay line.
// BEHAVIOURAL MODEL through its stages (see dl_stage); the flip-flop is RTL.
module delay_line_core #(
  parameter int unsigned N    = 16,
  parameter int unsigned SEED = 1
) (
  input  logic                             in_t,
  input  logic                             in_b,
  input  logic [N-1:0]                     s_t,
  input  logic [N-1:0]                     s_b,
  input  logic [N-1:0][dl_pkg::TUNE_W-1:0] tune_t,
  input  logic [N-1:0][dl_pkg::TUNE_W-1:0] tune_b,
  input  logic                             cb_rst,
  output logic                             out_t,
  output logic                             out_b,
  output logic                             cb
);
  timeunit 1ns;
  timeprecision 1fs;

  dl_path #(.N(N), .SEED(SEED), .PATH(0)) u_top (
    .in(in_t), .sel(s_t), .tune(tune_t), .out(out_t)
  );
  dl_path #(.N(N), .SEED(SEED), .PATH(1)) u_bot (
    .in(in_b), .sel(s_b), .tune(tune_b), .out(out_b)
  );
  arbiter_dff u_arb (.out_t(out_t), .out_b(out_b), .rst(cb_rst), .cb(cb));
endmodule
