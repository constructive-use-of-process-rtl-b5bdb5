// pv_tune_tb: fine-tuning the 16-stage line for balance, as a host would do it.
// Only the host register port is used. The share of cb = 1 is measured over a
// fixed training set of 256 random select patterns (the same pattern on both
// paths). Then each of the 96 tuning bits is tried in turn, and a flip is kept
// when it brings that share closer to one half (two passes). The result is judged
// on a separate set of 2048 patterns. The imbalance there must shrink compared
// with the untuned line, and cb must agree with the summed path delays for every
// pattern.
module pv_tune_tb;
  timeunit 1ns;
  timeprecision 1fs;
  import dl_pkg::*;

  localparam int unsigned N = 16, SEED = 1, NTRAIN = 256, NTEST = 2048;

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

  logic [N-1:0]             train [NTRAIN];
  logic [N-1:0]             test  [NTEST];
  logic [N-1:0][TUNE_W-1:0] tu_t = '0, tu_b = '0;

  task automatic wr(input logic [7:0] a, input logic [31:0] d);
    @(negedge clk[0]);
    wr_en = 1'b1; wr_addr = a; wdata = d;
    @(negedge clk[0]);
    wr_en = 1'b0;
  endtask

  task automatic load_tune();
    logic [TUNE_W*N-1:0] ft, fb;
    ft = tu_t; fb = tu_b;
    for (int k = 0; k < (TUNE_W * N + 31) / 32; k++) begin
      wr(8'h20 + 8'(k), 32'(ft >> (32 * k)));
      wr(8'h30 + 8'(k), 32'(fb >> (32 * k)));
    end
  endtask

  function automatic longint path_fs(input int unsigned p, input logic [N-1:0] s,
                                     input logic [N-1:0][TUNE_W-1:0] tu);
    longint d = 0;
    for (int unsigned i = 0; i < N; i++) d += longint'(stage_delay_fs(SEED, p, i, s[i], tu[i]));
    return d;
  endfunction

  // One checking-bit operation for pattern p; optionally checks cb.
  task automatic cb_op(input logic [N-1:0] p, input bit chk, output logic c);
    longint dt, db;
    wr(8'h00, 32'(p));
    wr(8'h10, 32'(p));
    wr(8'h40, 32'h3);
    rd_addr = 8'h41;
    do @(negedge clk[0]); while (!(rdata[1] && !rdata[0]));
    c = rdata[2];
    if (chk) begin
      dt = path_fs(0, p, tu_t);
      db = path_fs(1, p, tu_b);
      if (dt != db) begin
        checks++;
        if (c != (dt < db)) begin
          failures++;
          $display("FAIL: pattern %04h cb=%0b top %0d bottom %0d fs", p, c, dt, db);
        end
      end
    end
  endtask

  task automatic ones_train(output int n);
    logic c;
    n = 0;
    for (int k = 0; k < int'(NTRAIN); k++) begin
      cb_op(train[k], 1'b0, c);
      n += int'(c);
    end
  endtask

  task automatic ones_test(output int n);
    logic c;
    n = 0;
    for (int k = 0; k < int'(NTEST); k++) begin
      cb_op(test[k], 1'b1, c);
      n += int'(c);
    end
  endtask

  function automatic int imbal(input int n, input int tot);
    return (2 * n > tot) ? 2 * n - tot : tot - 2 * n;
  endfunction

  initial begin
    int n_before, n_after, cur, trial, kept;
    foreach (train[k]) train[k] = N'($urandom);
    foreach (test[k])  test[k]  = N'($urandom);
    repeat (4) @(posedge clk[0]);
    rst = 1'b0;
    load_tune();
    ones_test(n_before);
    ones_train(cur);
    kept = 0;
    for (int pass = 0; pass < 2; pass++) begin
      for (int b = 0; b < 2 * TUNE_W * int'(N); b++) begin
        int path, st, bit_i;
        path  = b / (TUNE_W * N);
        st    = (b % (TUNE_W * N)) / TUNE_W;
        bit_i = b % TUNE_W;
        if (path == 0) tu_t[st][bit_i] = ~tu_t[st][bit_i];
        else           tu_b[st][bit_i] = ~tu_b[st][bit_i];
        load_tune();
        ones_train(trial);
        if (imbal(trial, NTRAIN) < imbal(cur, NTRAIN)) begin
          cur = trial;
          kept++;
        end else begin
          if (path == 0) tu_t[st][bit_i] = ~tu_t[st][bit_i];
          else           tu_b[st][bit_i] = ~tu_b[st][bit_i];
        end
      end
    end
    load_tune();
    ones_test(n_after);
    $display("untuned: cb=1 for %0d of %0d (%0.1f%%); tuned (%0d bit flips kept): %0d of %0d (%0.1f%%)",
             n_before, NTEST, 100.0 * n_before / NTEST, kept, n_after, NTEST, 100.0 * n_after / NTEST);
    checks++;
    if (imbal(n_after, NTEST) >= imbal(n_before, NTEST)) begin
      failures++;
      $display("FAIL: tuning did not improve the balance");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #20_000_000;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
