// delay_line_core_tb: the plain delay line (both paths fed by one pulse). For
// random select vectors and tuning bits, cb must say whether the summed top-path
// delay is below the bottom-path delay, and out_t, out_b must arrive after those
// sums. Both values of cb must occur.
module delay_line_core_tb;
  timeunit 1ns;
  timeprecision 1fs;
  import dl_pkg::*;

  localparam int unsigned N = 16, SEED = 11;

  logic pulse = 1'b0, cb_rst = 1'b1;
  logic [N-1:0] s_t = '0, s_b = '0;
  logic [N-1:0][TUNE_W-1:0] tune_t = '0, tune_b = '0;
  logic out_t, out_b, cb;
  int checks = 0, failures = 0, ones = 0, zeros = 0;
  realtime t0, tt, tb_;

  delay_line_core #(.N(N), .SEED(SEED)) dut (
    .in_t(pulse), .in_b(pulse), .s_t(s_t), .s_b(s_b), .tune_t(tune_t), .tune_b(tune_b),
    .cb_rst(cb_rst), .out_t(out_t), .out_b(out_b), .cb(cb)
  );

  always @(posedge out_t) tt = $realtime;
  always @(posedge out_b) tb_ = $realtime;

  initial begin
    #20;
    for (int r = 0; r < 300; r++) begin
      longint dt, db;
      s_t = N'($urandom); s_b = N'($urandom);
      tune_t = (TUNE_W * N)'({$urandom, $urandom});
      tune_b = (TUNE_W * N)'({$urandom, $urandom});
      dt = 0; db = 0;
      for (int i = 0; i < N; i++) begin
        dt += longint'(stage_delay_fs(SEED, 0, i, s_t[i], tune_t[i]));
        db += longint'(stage_delay_fs(SEED, 1, i, s_b[i], tune_b[i]));
      end
      cb_rst = 1'b1; #1; cb_rst = 1'b0;
      pulse = 1'b1; t0 = $realtime;
      #12;
      pulse = 1'b0;
      #12;
      checks += 3;
      if (cb !== (dt < db)) begin
        failures++; $display("FAIL: cb=%b top=%0d bottom=%0d fs", cb, dt, db);
      end
      if ((tt - t0) * 1.0e6 < real'(dt) - 2.0 || (tt - t0) * 1.0e6 > real'(dt) + 2.0) begin
        failures++; $display("FAIL: top arrival");
      end
      if ((tb_ - t0) * 1.0e6 < real'(db) - 2.0 || (tb_ - t0) * 1.0e6 > real'(db) + 2.0) begin
        failures++; $display("FAIL: bottom arrival");
      end
      if (cb) ones++; else zeros++;
    end
    checks++;
    if (ones == 0 || zeros == 0) begin failures++; $display("FAIL: cb never %0d", ones == 0); end
    $display("cb ones=%0d zeros=%0d", ones, zeros);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
