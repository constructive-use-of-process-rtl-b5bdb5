// dl_stage_tb: for every select and tuning value, a rising and a falling edge are
// sent through one stage and the measured propagation delay is compared with the
// stage's channel delay plus tuning-path delay to 1 fs. A select change with no
// edge in flight must leave the output alone.
module dl_stage_tb;
  timeunit 1ns;
  timeprecision 1fs;
  import dl_pkg::*;

  localparam int unsigned SEED = 7, PATH = 1, IDX = 5;

  logic in = 1'b0, sel = 1'b0;
  logic [TUNE_W-1:0] tune = '0;
  logic out;
  int checks = 0, failures = 0;
  realtime t_in, t_out;

  dl_stage #(.SEED(SEED), .PATH(PATH), .IDX(IDX)) dut (.in(in), .sel(sel), .tune(tune), .out(out));

  always @(posedge out or negedge out) t_out = $realtime;

  task automatic edge_check(input logic v);
    real d, e;
    in = v;
    t_in = $realtime;
    #5;
    d = (t_out - t_in) * 1.0e6;
    e = real'(stage_delay_fs(SEED, PATH, IDX, sel, tune));
    checks += 2;
    if (out !== v) begin failures++; $display("FAIL: out=%b want %b", out, v); end
    if (d < e - 1.0 || d > e + 1.0) begin
      failures++; $display("FAIL: sel=%b tune=%b delay %0.1f fs want %0.0f", sel, tune, d, e);
    end
  endtask

  initial begin
    #5;
    for (int s = 0; s < 2; s++) begin
      for (int t = 0; t < 8; t++) begin
        sel = s[0]; tune = 3'(t);
        #1;
        edge_check(1'b1);
        edge_check(1'b0);
      end
    end
    // channel delays must differ (process variation) and sel must matter
    checks++;
    if (stage_delay_fs(SEED, PATH, IDX, 1'b0, 3'd0) == stage_delay_fs(SEED, PATH, IDX, 1'b1, 3'd0)) begin
      failures++; $display("FAIL: channels have equal delay");
    end
    // select change with a stable input
    in = 1'b1; #5;
    sel = ~sel; #5;
    checks++;
    if (out !== 1'b1) begin failures++; $display("FAIL: output disturbed by select change"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
