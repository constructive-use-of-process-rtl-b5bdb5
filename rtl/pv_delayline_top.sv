// pv_delayline_top: the complete measurement structure of the delay line. The
// delay line (two N-stage MUX paths and the checking-bit flip-flop) has a feedback
// loop around each path: a loop_input block (mode MUX plus reset gates 1 and 2) at
// each path's entry and an mp_counter on each path's output. meas_ctrl runs
// checking-bit generation (one pulse through both paths, cb read afterwards) or
// delay measurement (the pulse circulates in both loops for t_c and the counters
// count the passes C1, C2; the path delay difference is t_c*(1/C1 - 1/C2)).
// host_regs holds the select vectors, tuning bits and mode and returns status, cb
// and the counts to the host.
// Interface: clk[3:0] are the four 250 MHz counter phases, clk[0] also clocking
// the control logic; rst is synchronous to clk[0]; wr_en/wr_addr/wdata and
// rd_addr/rdata are the host register port (map in host_regs). cb, done, out_t and
// out_b are brought out for observation. The structure follows the prototype's
// measurement schematic; the pulse is generated by the controller, not taken from
// a pin, which is this design's choice.
// The delay paths are behavioural models (they exist for their delays), so this
// module simulates with timing and is not meant for synthesis as a whole. The
// combinational loop that synthesis reports through loop_input and the delay
// paths is deliberate: in delay measuring mode each path and its feedback wire
// form the ring oscillator whose period is measured.
module pv_delayline_top
  import dl_pkg::*;
#(
  parameter int unsigned N             = 16,
  parameter int unsigned SEED          = 1,
  parameter int unsigned CNT_W         = 16,
  parameter int unsigned WINDOW_CYCLES = 2500
) (
  input  logic [3:0]  clk,
  input  logic        rst,
  input  logic        wr_en,
  input  logic [7:0]  wr_addr,
  input  logic [31:0] wdata,
  input  logic [7:0]  rd_addr,
  output logic [31:0] rdata,
  output logic        cb,
  output logic        done,
  output logic        out_t,
  output logic        out_b
);
  timeunit 1ns;
  timeprecision 1fs;

  logic [N-1:0]             s_t, s_b;
  logic [N-1:0][TUNE_W-1:0] tune_t, tune_b;
  cmd_e                     cmd;
  logic                     start, busy;
  logic                     mux_sel, rst1, rst2, pulse, cb_rst, cnt_clear, cnt_en;
  logic                     in_t, in_b;
  logic [CNT_W-1:0]         c1, c2;

  host_regs #(.N(N), .CNT_W(CNT_W)) u_regs (
    .clk(clk[0]), .rst(rst), .wr_en(wr_en), .wr_addr(wr_addr), .wdata(wdata),
    .rd_addr(rd_addr), .rdata(rdata), .s_t(s_t), .s_b(s_b), .tune_t(tune_t),
    .tune_b(tune_b), .cmd(cmd), .start(start), .busy(busy), .done(done), .cb(cb),
    .c1(c1), .c2(c2)
  );

  meas_ctrl #(.WINDOW_CYCLES(WINDOW_CYCLES)) u_ctrl (
    .clk(clk[0]), .rst(rst), .start(start), .cmd(cmd), .busy(busy), .done(done),
    .mux_sel(mux_sel), .rst1(rst1), .rst2(rst2), .pulse(pulse), .cb_rst(cb_rst),
    .cnt_clear(cnt_clear), .cnt_en(cnt_en)
  );

  loop_input u_in_t (
    .pulse_in(pulse), .fb(out_t), .mux_sel(mux_sel), .rst1(rst1), .rst2(rst2), .y(in_t)
  );
  loop_input u_in_b (
    .pulse_in(pulse), .fb(out_b), .mux_sel(mux_sel), .rst1(rst1), .rst2(rst2), .y(in_b)
  );

  delay_line_core #(.N(N), .SEED(SEED)) u_core (
    .in_t(in_t), .in_b(in_b), .s_t(s_t), .s_b(s_b), .tune_t(tune_t), .tune_b(tune_b),
    .cb_rst(cb_rst), .out_t(out_t), .out_b(out_b), .cb(cb)
  );

  mp_counter #(.CNT_W(CNT_W)) u_cnt1 (
    .clk(clk), .rst(rst), .sig(out_t), .clear(cnt_clear), .en(cnt_en), .count(c1)
  );
  mp_counter #(.CNT_W(CNT_W)) u_cnt2 (
    .clk(clk), .rst(rst), .sig(out_b), .clear(cnt_clear), .en(cnt_en), .count(c2)
  );
endmodule
