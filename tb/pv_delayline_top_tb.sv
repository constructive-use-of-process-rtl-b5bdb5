// pv_delayline_top_tb: end-to-end test of the delay-line measurement structure.
// Four 250 MHz clock phases 0.5 ns apart drive the design. Through the host
// register port the test writes random select vectors and tuning bits, then runs
//   * checking-bit generation: cb must equal (top path delay < bottom path delay),
//     and the arrival times of out_t / out_b after the launch must equal the sums
//     of the selected stage delays (the linear additive model) to 1 fs;
//   * delay measurement over the default 10 us window: C1 and C2 must match the number of
//     loop passes expected from the path delays within one count, and the delay
//     difference recovered as t_c*(1/C1 - 1/C2) must match the true difference
//     within the count quantisation;
//   * mode switches between the two, checking that the reset gates leave both
//     loops silent after a measurement;
//   * a tuning-bit change that moves the arrival time of the path by the
//     expected amount.
// Each mechanism is counted and must occur at least once. Expected values come
// from the per-stage delays of the process-variation stand-in, summed here.
module pv_delayline_top_tb;
  timeunit 1ns;
  timeprecision 1fs;
  import dl_pkg::*;

  localparam int unsigned N    = 16;
  localparam int unsigned SEED = 1;
  localparam int unsigned WIN  = 2500;       // t_c = 10 us, the default window
  localparam int unsigned NOPS = 12;

  logic [3:0]  clk = 4'b0000;
  logic        rst = 1'b1;
  logic        wr_en = 1'b0;
  logic [7:0]  wr_addr = '0, rd_addr = '0;
  logic [31:0] wdata = '0, rdata;
  logic        cb, done, out_t, out_b;

  int checks = 0, failures = 0;
  int n_cb = 0, n_meas = 0, n_switch = 0, n_quiet = 0, n_tune = 0, n_cb1 = 0, n_cb0 = 0;

  pv_delayline_top dut (
    .clk(clk), .rst(rst), .wr_en(wr_en), .wr_addr(wr_addr), .wdata(wdata),
    .rd_addr(rd_addr), .rdata(rdata), .cb(cb), .done(done), .out_t(out_t), .out_b(out_b)
  );

  for (genvar g = 0; g < 4; g++) begin : g_clk
    initial begin
      #(0.5 * g + 2.0);
      forever begin clk[g] = 1'b1; #2.0; clk[g] = 1'b0; #2.0; end
    end
  end

  realtime t_rise_t, t_rise_b, t_launch;
  always @(posedge out_t) t_rise_t = $realtime;
  always @(posedge out_b) t_rise_b = $realtime;
  always @(posedge dut.pulse) t_launch = $realtime;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  task automatic wr(input logic [7:0] a, input logic [31:0] d);
    @(negedge clk[0]);
    wr_en = 1'b1; wr_addr = a; wdata = d;
    @(negedge clk[0]);
    wr_en = 1'b0;
  endtask

  task automatic rd(input logic [7:0] a, output logic [31:0] d);
    @(negedge clk[0]);
    rd_addr = a;
    #0.1;
    d = rdata;
  endtask

  logic [N-1:0]             s_t, s_b;
  logic [N-1:0][TUNE_W-1:0] tu_t, tu_b;
  logic                     last_mode = 1'b1;

  function automatic longint path_fs(input int unsigned p, input logic [N-1:0] s,
                                     input logic [N-1:0][TUNE_W-1:0] tu);
    longint d = 0;
    for (int unsigned i = 0; i < N; i++) d += longint'(stage_delay_fs(SEED, p, i, s[i], tu[i]));
    return d;
  endfunction

  task automatic load_cfg();
    logic [TUNE_W*N-1:0] ft, fb;
    ft = tu_t; fb = tu_b;
    wr(8'h00, 32'(s_t));
    wr(8'h10, 32'(s_b));
    for (int k = 0; k < (TUNE_W * N + 31) / 32; k++) begin
      wr(8'h20 + 8'(k), 32'(ft >> (32 * k)));
      wr(8'h30 + 8'(k), 32'(fb >> (32 * k)));
    end
  endtask

  task automatic run(input logic mode);
    logic [31:0] st;
    int guard;
    if (mode != last_mode) n_switch++;
    last_mode = mode;
    wr(8'h40, {30'd0, 1'b1, mode});
    guard = 0;
    do begin
      rd(8'h41, st);
      guard++;
    end while (!(st[1] && !st[0]) && guard < 4 * WIN + 200);
    check(guard < 4 * WIN + 200, "operation did not finish");
  endtask

  task automatic do_cb();
    longint dt, db;
    logic [31:0] st;
    realtime at, ab;
    run(1'b1);
    dt = path_fs(0, s_t, tu_t);
    db = path_fs(1, s_b, tu_b);
    rd(8'h41, st);
    check(st[2] == (dt < db), $sformatf("cb=%0b but top %0d fs, bottom %0d fs", st[2], dt, db));
    check(cb == st[2], "cb pin and status disagree");
    at = (t_rise_t - t_launch) * 1.0e6;
    ab = (t_rise_b - t_launch) * 1.0e6;
    check(at > real'(dt) - 1.5 && at < real'(dt) + 1.5,
          $sformatf("top arrival %0.1f fs, expected %0d", at, dt));
    check(ab > real'(db) - 1.5 && ab < real'(db) + 1.5,
          $sformatf("bottom arrival %0.1f fs, expected %0d", ab, db));
    if (st[2]) n_cb1++; else n_cb0++;
    n_cb++;
  endtask

  // Passes expected: rising edges at launch + k*D (k >= 1) that fall in the
  // counting window, which spans WIN periods from the end of the launch cycle.
  function automatic int expect_count(input longint d_fs);
    real w0, w1, t;
    int  n = 0;
    w0 = 4.0e6;
    w1 = w0 + real'(WIN) * 4.0e6;
    for (int k = 1; k < 100000; k++) begin
      t = real'(k) * real'(d_fs);
      if (t >= w1) break;
      if (t >= w0) n++;
    end
    return n;
  endfunction

  task automatic do_meas();
    longint dt, db;
    logic [31:0] c1, c2;
    int e1, e2;
    real tc, est, tru, tol;
    logic ot, ob;
    run(1'b0);
    dt = path_fs(0, s_t, tu_t);
    db = path_fs(1, s_b, tu_b);
    rd(8'h42, c1);
    rd(8'h43, c2);
    e1 = expect_count(dt);
    e2 = expect_count(db);
    check(int'(c1) >= e1 - 1 && int'(c1) <= e1 + 1, $sformatf("C1=%0d expected %0d", c1, e1));
    check(int'(c2) >= e2 - 1 && int'(c2) <= e2 + 1, $sformatf("C2=%0d expected %0d", c2, e2));
    tc  = real'(WIN) * 4.0e6;   // fs
    est = tc * (1.0 / real'(c1) - 1.0 / real'(c2));
    tru = real'(dt - db);
    tol = tc / (real'(c1) - 1.0) - tc / (real'(c1) + 1.0)
        + tc / (real'(c2) - 1.0) - tc / (real'(c2) + 1.0);
    check(est > tru - tol && est < tru + tol,
          $sformatf("t_out estimate %0.0f fs, true %0.0f fs", est, tru));
    n_meas++;
    // the reset gates must have stopped both loops
    ot = out_t; ob = out_b;
    repeat (10) begin
      @(posedge clk[1]);
      if (out_t || out_b) ot = 1'b1;
    end
    check(!ot && !ob, "loop still oscillating after the measurement");
    if (!ot && !ob) n_quiet++;
  endtask

  initial begin
    repeat (4) @(posedge clk[0]);
    rst = 1'b0;
    for (int op = 0; op < NOPS; op++) begin
      s_t  = N'($urandom);
      s_b  = N'($urandom);
      tu_t = (TUNE_W * N)'({$urandom, $urandom});
      tu_b = (TUNE_W * N)'({$urandom, $urandom});
      load_cfg();
      do_cb();
      if (op % 4 == 2) begin
        // tuning-bit change on one top stage moves the top arrival accordingly
        realtime a0, a1;
        longint  d0, d1;
        a0 = t_rise_t - t_launch;
        d0 = path_fs(0, s_t, tu_t);
        tu_t[op % N] = ~tu_t[op % N];
        d1 = path_fs(0, s_t, tu_t);
        load_cfg();
        do_cb();
        a1 = t_rise_t - t_launch;
        check((a1 - a0) * 1.0e6 > real'(d1 - d0) - 2.0 && (a1 - a0) * 1.0e6 < real'(d1 - d0) + 2.0,
              $sformatf("tuning moved top arrival by %0.1f fs, expected %0d", (a1 - a0) * 1.0e6, d1 - d0));
        n_tune++;
      end
      if (op % 3 == 1) do_meas();
    end
    // Every mechanism must have happened.
    check(n_cb > 0,     "no checking-bit generation");
    check(n_meas > 0,   "no delay measurement");
    check(n_switch > 0, "no mode switch");
    check(n_quiet > 0,  "no loop clean-up by the reset gates");
    check(n_tune > 0,   "no tuning-bit change");
    $display("mechanisms: cb_gen=%0d (cb1=%0d cb0=%0d) measure=%0d mode_switch=%0d loop_cleared=%0d tune=%0d",
             n_cb, n_cb1, n_cb0, n_meas, n_switch, n_quiet, n_tune);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #(4.0 * 200000);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
