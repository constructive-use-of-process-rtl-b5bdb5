// dl_path_tb: random select vectors and tuning bits are applied to a 16-stage path;
// each rising and falling edge must come out after exactly the sum of the selected
// stage delays (the linear additive delay model), to 1 fs.
module dl_path_tb;
  timeunit 1ns;
  timeprecision 1fs;
  import dl_pkg::*;

  localparam int unsigned N = 16, SEED = 3, PATH = 0;

  logic in = 1'b0;
  logic [N-1:0] sel = '0;
  logic [N-1:0][TUNE_W-1:0] tune = '0;
  logic out;
  int checks = 0, failures = 0;
  realtime t_in, t_out;

  dl_path #(.N(N), .SEED(SEED), .PATH(PATH)) dut (.in(in), .sel(sel), .tune(tune), .out(out));

  always @(posedge out or negedge out) t_out = $realtime;

  initial begin
    #20;
    for (int r = 0; r < 40; r++) begin
      real d, e;
      sel  = N'($urandom);
      tune = (TUNE_W * N)'({$urandom, $urandom});
      e = 0.0;
      for (int i = 0; i < N; i++) e += real'(stage_delay_fs(SEED, PATH, i, sel[i], tune[i]));
      #1;
      in = ~in;
      t_in = $realtime;
      #20;
      d = (t_out - t_in) * 1.0e6;
      checks += 2;
      if (out !== in) begin failures++; $display("FAIL: out=%b in=%b", out, in); end
      if (d < e - 2.0 || d > e + 2.0) begin
        failures++; $display("FAIL: path delay %0.1f fs want %0.0f", d, e);
      end
    end
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
