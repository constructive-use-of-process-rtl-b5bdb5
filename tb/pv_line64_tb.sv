// pv_line64_tb: the circuit-level evaluation size: a 64-stage delay line (two paths
// sharing one input pulse, as in the basic scheme) with 50,000 random select
// vectors. cb must follow the sign of the delay difference; the share of cb = 1,
// the range of t_out = arrival(out_b) - arrival(out_t) and the smallest |t_out|
// are printed. Exact ties have no defined cb and are counted, not checked.
module pv_line64_tb;
  timeunit 1ns;
  timeprecision 1fs;
  import dl_pkg::*;

  localparam int unsigned N = 64, SEED = 5, NRAND = 50_000;

  logic pulse = 1'b0, cb_rst = 1'b1;
  logic [N-1:0] s_t = '0, s_b = '0;
  logic [N-1:0][TUNE_W-1:0] tz = '0;
  logic out_t, out_b, cb;
  int checks = 0, failures = 0;

  delay_line_core #(.N(N), .SEED(SEED)) dut (
    .in_t(pulse), .in_b(pulse), .s_t(s_t), .s_b(s_b), .tune_t(tz), .tune_b(tz),
    .cb_rst(cb_rst), .out_t(out_t), .out_b(out_b), .cb(cb)
  );

  longint d_t[2][N], d_b[2][N];

  initial begin
    int ones = 0, ties = 0;
    real tmin = 1.0e30, tmax = -1.0e30, best = 1.0e30;
    for (int i = 0; i < N; i++)
      for (int c = 0; c < 2; c++) begin
        d_t[c][i] = longint'(stage_delay_fs(SEED, 0, i, c[0], 3'd0));
        d_b[c][i] = longint'(stage_delay_fs(SEED, 1, i, c[0], 3'd0));
      end
    for (int r = 0; r < int'(NRAND); r++) begin
      longint dt, db;
      real tout, a;
      s_t = {$urandom, $urandom};
      s_b = {$urandom, $urandom};
      dt = 0; db = 0;
      for (int i = 0; i < N; i++) begin
        dt += d_t[s_t[i]][i];
        db += d_b[s_b[i]][i];
      end
      cb_rst = 1'b1; #0.5; cb_rst = 1'b0;
      pulse = 1'b1; #30; pulse = 1'b0; #30;
      if (dt == db) ties++;
      else begin
        checks++;
        if (cb != (dt < db)) begin
          failures++;
          if (failures < 20) $display("FAIL: vector %0d cb=%0b top %0d fs bottom %0d fs", r, cb, dt, db);
        end
      end
      if (cb) ones++;
      tout = real'(db - dt) / 1000.0;
      a = tout < 0.0 ? -tout : tout;
      if (tout < tmin) tmin = tout;
      if (tout > tmax) tmax = tout;
      if (a < best) best = a;
    end
    $display("64 stages, %0d vectors: cb=1 for %0d, exact ties %0d; t_out in [%0.1f ps, %0.1f ps]; smallest |t_out| %0.3f ps",
             NRAND, ones, ties, tmin, tmax, best);
    checks++;
    if (ones == 0 || ones == int'(NRAND)) begin failures++; $display("FAIL: cb constant"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #10_000_000;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
