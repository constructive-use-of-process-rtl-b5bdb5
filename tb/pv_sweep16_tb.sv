// pv_sweep16_tb: the evaluations of the 16-stage prototype.
//  1. The 16-stage design, driven through its host port: every one of the 2^16
//     select patterns (the same pattern on both paths) gets a checking-bit
//     operation, and cb is compared with the summed path delays. The share of
//     ones and the range of t_out are printed; the share must be strictly
//     between 0 and 1.
//  2. Delay measurement over the full 10 us window for 8 patterns: the delay
//     difference recovered from the two counts, t_c*(1/C1 - 1/C2), must match the
//     true path difference within the count quantisation.
// A pattern whose two path delays are exactly equal has no defined cb (a real
// flip-flop would go metastable); such ties are counted and not checked.
module pv_sweep16_tb;
  timeunit 1ns;
  timeprecision 1fs;
  import dl_pkg::*;

  localparam int unsigned N = 16, SEED = 1, WIN = 2500;

  logic [3:0]  clk = 4'b0000;
  logic        rst = 1'b1;
  logic        wr_en = 1'b0;
  logic [7:0]  wr_addr = '0, rd_addr = '0;
  logic [31:0] wdata = '0, rdata;
  logic        cb, done, out_t, out_b;
  int checks = 0, failures = 0;

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

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL: %s", what);
    end
  endtask

  task automatic wr(input logic [7:0] a, input logic [31:0] d);
    @(negedge clk[0]);
    wr_en = 1'b1; wr_addr = a; wdata = d;
    @(negedge clk[0]);
    wr_en = 1'b0;
  endtask

  task automatic run(input logic mode, output logic [31:0] st);
    wr(8'h40, {30'd0, 1'b1, mode});
    rd_addr = 8'h41;
    do @(negedge clk[0]); while (!(rdata[1] && !rdata[0]));
    st = rdata;
  endtask

  // per-stage delay tables of the 16-stage design, all tuning bits at 0
  longint d_t[2][N], d_b[2][N];

  function automatic longint sum_path(input longint tab[2][N], input logic [N-1:0] s);
    longint d = 0;
    for (int i = 0; i < N; i++) d += tab[s[i]][i];
    return d;
  endfunction

  initial begin
    int ones = 0, ties = 0;
    real tmin = 1.0e30, tmax = -1.0e30, best = 1.0e30;
    logic [31:0] st, c1, c2;
    for (int i = 0; i < N; i++)
      for (int c = 0; c < 2; c++) begin
        d_t[c][i] = longint'(stage_delay_fs(SEED, 0, i, c[0], 3'd0));
        d_b[c][i] = longint'(stage_delay_fs(SEED, 1, i, c[0], 3'd0));
      end
    repeat (4) @(posedge clk[0]);
    rst = 1'b0;

    // 1. all 2^16 patterns, checking-bit mode
    for (int p = 0; p < (1 << N); p++) begin
      wr(8'h00, 32'(p));
      wr(8'h10, 32'(p));
      run(1'b1, st);
      if (sum_path(d_t, N'(p)) == sum_path(d_b, N'(p))) ties++;
      else check(st[2] == (sum_path(d_t, N'(p)) < sum_path(d_b, N'(p))),
                 $sformatf("pattern %04h: cb=%0b", p, st[2]));
      if (st[2]) ones++;
      begin
        real tout, a;
        tout = real'(sum_path(d_b, N'(p)) - sum_path(d_t, N'(p))) / 1000.0;
        a = tout < 0.0 ? -tout : tout;
        if (tout < tmin) tmin = tout;
        if (tout > tmax) tmax = tout;
        if (a > 0.0 && a < best) best = a;
      end
    end
    $display("t_out = arrival(out_b) - arrival(out_t) over all patterns: [%0.1f ps, %0.1f ps], smallest nonzero |t_out| %0.3f ps",
             tmin, tmax, best);
    $display("16 stages, 2^16 patterns: cb=1 for %0d, cb=0 for %0d, exact ties %0d",
             ones, (1 << N) - ones, ties);
    check(ones > 0 && ones < (1 << N), "cb constant over all patterns");

    // 2. delay measurement over t_c = 10 us for a few patterns
    for (int k = 0; k < 8; k++) begin
      logic [N-1:0] p;
      real tc, est, tru, tol;
      p = N'($urandom);
      wr(8'h00, 32'(p));
      wr(8'h10, 32'(p));
      run(1'b0, st);
      rd_addr = 8'h42; @(negedge clk[0]); c1 = rdata;
      rd_addr = 8'h43; @(negedge clk[0]); c2 = rdata;
      tc  = real'(WIN) * 4.0e6;
      est = tc * (1.0 / real'(c1) - 1.0 / real'(c2));
      tru = real'(sum_path(d_t, p) - sum_path(d_b, p));
      tol = tc / (real'(c1) - 1.0) - tc / (real'(c1) + 1.0)
          + tc / (real'(c2) - 1.0) - tc / (real'(c2) + 1.0);
      check(est > tru - tol && est < tru + tol,
            $sformatf("pattern %04h: Eq.5 %0.0f fs, true %0.0f fs", p, est, tru));
      $display("pattern %04h: C1=%0d C2=%0d  t_c*(1/C1-1/C2)=%0.1f ps  path difference=%0.1f ps",
               p, c1, c2, est / 1000.0, tru / 1000.0);
    end

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
