// meas_ctrl: sequences one operation of the delay-line measurement structure, in
// the 250 MHz clk domain. Two operations exist, matching the two modes:
//   CMD_CB   (checking-bit generation, mode = 1): reset the loops and cb, then
//            drive a PULSE_CYCLES-long pulse into both paths with the mode MUX on
//            the pulse input, wait SETTLE_CYCLES for both edges to reach the
//            flip-flop, and report done; cb is then valid.
//   CMD_MEAS (delay measuring, mode = 0): reset the loops and clear the counters,
//            launch the pulse in the same way, then at the clock edge that ends the
//            pulse switch the MUX to feedback so the pulse circulates in each loop,
//            and enable both counters for WINDOW_CYCLES (t_c = 10 us at 250 MHz).
//            Then the reset gates stop the oscillation and done is reported with the
//            counts held.
// Reset gates 1 and 2 are held high whenever nothing runs, so no residual pulse is
// left in a loop across a mode change. All outputs are registered. start is
// ignored while busy. done stays high until the next start.
// The two modes, the reset gates' purpose and t_c follow the prototype; the order
// of events, the reset/settle lengths and the way the pulse is injected into the
// loop (MUX on the pulse input for the launch cycle, on feedback afterwards) are
// this design's choices. For the injection to work, one loop period must exceed
// PULSE_CYCLES clock periods.
module meas_ctrl
  import dl_pkg::*;
#(
  parameter int unsigned RESET_CYCLES  = 8,
  parameter int unsigned PULSE_CYCLES  = 1,
  parameter int unsigned SETTLE_CYCLES = 8,
  parameter int unsigned WINDOW_CYCLES = 2500
) (
  input  logic clk,
  input  logic rst,
  input  logic start,
  input  cmd_e cmd,
  output logic busy,
  output logic done,
  output logic mux_sel,    // 1: pulse input, 0: loop feedback
  output logic rst1,       // reset gate on the feedback
  output logic rst2,       // reset gate after the MUX
  output logic pulse,      // pulse into both paths
  output logic cb_rst,     // clears the checking-bit flip-flop
  output logic cnt_clear,
  output logic cnt_en
);
  timeunit 1ns;
  timeprecision 1fs;

  state_e      state;
  cmd_e        op;
  logic [31:0] timer;

  always_ff @(posedge clk) begin
    if (rst) begin
      state     <= ST_IDLE;
      op        <= CMD_NONE;
      timer     <= '0;
      busy      <= 1'b0;
      done      <= 1'b0;
      mux_sel   <= 1'b1;
      rst1      <= 1'b1;
      rst2      <= 1'b1;
      pulse     <= 1'b0;
      cb_rst    <= 1'b1;
      cnt_clear <= 1'b1;
      cnt_en    <= 1'b0;
    end else begin
      cb_rst    <= 1'b0;
      cnt_clear <= 1'b0;
      unique case (state)
        ST_IDLE: begin
          if (start && (cmd == CMD_CB || cmd == CMD_MEAS)) begin
            op        <= cmd;
            state     <= ST_RESET;
            timer     <= 32'(RESET_CYCLES - 1);
            busy      <= 1'b1;
            done      <= 1'b0;
            mux_sel   <= 1'b1;
            rst1      <= 1'b1;
            rst2      <= 1'b1;
            cb_rst    <= 1'b1;
            cnt_clear <= 1'b1;
          end
        end
        ST_RESET: begin
          cb_rst    <= 1'b1;
          cnt_clear <= 1'b1;
          if (timer == 0) begin
            state  <= ST_LAUNCH;
            timer  <= 32'(PULSE_CYCLES - 1);
            cb_rst <= 1'b0;
            rst1   <= 1'b0;
            rst2   <= 1'b0;
            pulse  <= 1'b1;
          end else begin
            timer <= timer - 1;
          end
        end
        ST_LAUNCH: begin
          if (timer == 0) begin
            pulse <= 1'b0;
            if (op == CMD_MEAS) begin
              state   <= ST_COUNT;
              timer   <= 32'(WINDOW_CYCLES - 1);
              mux_sel <= 1'b0;
              cnt_en  <= 1'b1;
            end else begin
              state <= ST_SETTLE;
              timer <= 32'(SETTLE_CYCLES - 1);
            end
          end else begin
            timer <= timer - 1;
          end
        end
        ST_SETTLE, ST_COUNT: begin
          if (timer == 0) begin
            state   <= ST_STOP;
            cnt_en  <= 1'b0;
            rst1    <= 1'b1;
            rst2    <= 1'b1;
            mux_sel <= 1'b1;
          end else begin
            timer <= timer - 1;
          end
        end
        ST_STOP: begin
          state <= ST_IDLE;
          busy  <= 1'b0;
          done  <= 1'b1;
        end
        default: state <= ST_IDLE;
      endcase
    end
  end

  // The pulse is only driven with the MUX on the pulse input, and the counters
  // only run with the MUX on feedback.
  assert property (@(posedge clk) disable iff (rst) pulse |-> mux_sel);
  assert property (@(posedge clk) disable iff (rst) cnt_en |-> !mux_sel);
endmodule
