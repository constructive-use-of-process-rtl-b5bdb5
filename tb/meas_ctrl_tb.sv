// meas_ctrl_tb: runs checking-bit and measurement operations through the controller
// with a 20-cycle window and checks, cycle by cycle, the output sequence: resets
// high before the launch, exactly PULSE_CYCLES of pulse with the MUX on the pulse
// input and the reset gates open, no counting in checking-bit mode, exactly
// WINDOW_CYCLES of counter enable with the MUX on feedback in measuring mode,
// reset gates closed afterwards, and the start-to-done latency
// RESET + PULSE + (SETTLE or WINDOW) + 1 cycles. A start while busy is ignored.
module meas_ctrl_tb;
  timeunit 1ns;
  timeprecision 1fs;
  import dl_pkg::*;

  localparam int unsigned RESET_CYCLES = 8, PULSE_CYCLES = 1, SETTLE_CYCLES = 8, WINDOW_CYCLES = 20;

  logic clk = 1'b0, rst = 1'b1, start = 1'b0;
  cmd_e cmd = CMD_NONE;
  logic busy, done, mux_sel, rst1, rst2, pulse, cb_rst, cnt_clear, cnt_en;
  int checks = 0, failures = 0;

  meas_ctrl #(.RESET_CYCLES(RESET_CYCLES), .PULSE_CYCLES(PULSE_CYCLES),
              .SETTLE_CYCLES(SETTLE_CYCLES), .WINDOW_CYCLES(WINDOW_CYCLES)) dut (
    .clk(clk), .rst(rst), .start(start), .cmd(cmd), .busy(busy), .done(done),
    .mux_sel(mux_sel), .rst1(rst1), .rst2(rst2), .pulse(pulse), .cb_rst(cb_rst),
    .cnt_clear(cnt_clear), .cnt_en(cnt_en)
  );

  always #2 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  // cyc - 1 is the number of clock edges from the one that samples start to the
  // one that raises done.
  task automatic op(input cmd_e c);
    int cyc, n_pulse, n_en, n_reset_before, n_clear;
    bit launched;
    @(negedge clk); cmd = c; start = 1'b1;
    @(negedge clk); start = 1'b0;
    cyc = 1; n_pulse = 0; n_en = 0; n_reset_before = 0; n_clear = 0; launched = 0;
    check(busy && !done, "busy not raised");
    while (!done && cyc < 200) begin
      if (pulse) begin
        launched = 1;
        n_pulse++;
        check(mux_sel && !rst1 && !rst2, "pulse without MUX on input or with resets");
      end
      if (!launched && rst1 && rst2) n_reset_before++;
      if (cnt_clear) n_clear++;
      if (cnt_en) begin
        n_en++;
        check(!mux_sel && !rst1 && !rst2, "counting without the loop closed");
      end
      if (cyc == 3) begin
        // a second start while busy must be ignored
        start = 1'b1; cmd = (c == CMD_CB) ? CMD_MEAS : CMD_CB;
      end
      if (cyc == 4) start = 1'b0;
      @(negedge clk);
      cyc++;
    end
    check(n_pulse == PULSE_CYCLES, $sformatf("pulse lasted %0d cycles", n_pulse));
    check(n_reset_before >= RESET_CYCLES, "reset phase too short");
    check(n_clear > 0 || c == CMD_CB, "counters not cleared");
    if (c == CMD_MEAS) begin
      check(n_en == WINDOW_CYCLES, $sformatf("counter enabled %0d cycles", n_en));
      check(cyc - 1 == RESET_CYCLES + PULSE_CYCLES + WINDOW_CYCLES + 1, $sformatf("meas latency %0d", cyc));
    end else begin
      check(n_en == 0, "counter enabled in checking-bit mode");
      check(cyc - 1 == RESET_CYCLES + PULSE_CYCLES + SETTLE_CYCLES + 1, $sformatf("cb latency %0d", cyc));
    end
    check(done && !busy && rst1 && rst2 && mux_sel, "end state");
    repeat (30) @(negedge clk);
    check(done && !busy, "ignored start ran anyway");
  endtask

  initial begin
    repeat (3) @(negedge clk);
    rst = 1'b0;
    @(negedge clk);
    check(!busy && !done && rst1 && rst2, "idle after reset");
    op(CMD_CB);
    op(CMD_MEAS);
    op(CMD_MEAS);
    op(CMD_CB);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #20000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
