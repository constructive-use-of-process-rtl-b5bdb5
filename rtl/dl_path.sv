// dl_path: one configurable path of the delay line (top or bottom), a chain of N
// dl_stage MUX stages. Stage i takes path-selecting bit sel[i] and fine-tuning bits
// tune[i]; the path delay is the sum of the N selected stage delays (the linear
// additive delay model). N = 16 as in the FPGA prototype; the HSpice study used 64.
// BEHAVIOURAL MODEL: the chain itself is plain wiring, but its only purpose is the
// delay of the stages it instantiates, which are behavioural models.
// Ports: in (pulse entering the path), sel[N-1:0], tune[N-1:0][2:0], out.
module dl_path #(
  parameter int unsigned N    = 16,
  parameter int unsigned SEED = 1,
  parameter int unsigned PATH = 0
) (
  input  logic                                in,
  input  logic [N-1:0]                        sel,
  input  logic [N-1:0][dl_pkg::TUNE_W-1:0]    tune,
  output logic                                out
);
  timeunit 1ns;
  timeprecision 1fs;

  logic [N:0] node;
  assign node[0] = in;

  for (genvar g = 0; g < N; g++) begin : g_stage
    dl_stage #(.SEED(SEED), .PATH(PATH), .IDX(g)) u_stage (
      .in(node[g]), .sel(sel[g]), .tune(tune[g]), .out(node[g+1])
    );
  end

  assign out = node[N];
endmodule
