// host_regs_tb: writes random select and tuning words, reads them back and checks
// the configuration outputs bit for bit; checks that a CTRL write sets the mode and
// gives a one-cycle start, and that STATUS, C1 and C2 read back the inputs.
module host_regs_tb;
  timeunit 1ns;
  timeprecision 1fs;
  import dl_pkg::*;

  localparam int unsigned N = 16, CNT_W = 16;

  logic clk = 1'b0, rst = 1'b1, wr_en = 1'b0;
  logic [7:0] wr_addr = '0, rd_addr = '0;
  logic [31:0] wdata = '0, rdata;
  logic [N-1:0] s_t, s_b;
  logic [N-1:0][TUNE_W-1:0] tune_t, tune_b;
  cmd_e cmd;
  logic start, busy = 1'b0, done = 1'b0, cb = 1'b0;
  logic [CNT_W-1:0] c1 = '0, c2 = '0;
  int checks = 0, failures = 0, n_start = 0;

  host_regs #(.N(N), .CNT_W(CNT_W)) dut (.*);

  always #2 clk = ~clk;
  always @(posedge clk) if (start) n_start++;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  task automatic wr(input logic [7:0] a, input logic [31:0] d);
    @(negedge clk); wr_en = 1'b1; wr_addr = a; wdata = d;
    @(negedge clk); wr_en = 1'b0;
  endtask

  initial begin
    logic [31:0] w_st, w_sb, w_t0, w_t1, w_b0, w_b1, r;
    repeat (2) @(negedge clk);
    rst = 1'b0;
    for (int it = 0; it < 20; it++) begin
      w_st = $urandom; w_sb = $urandom;
      w_t0 = $urandom; w_t1 = $urandom; w_b0 = $urandom; w_b1 = $urandom;
      wr(8'h00, w_st); wr(8'h10, w_sb);
      wr(8'h20, w_t0); wr(8'h21, w_t1);
      wr(8'h30, w_b0); wr(8'h31, w_b1);
      @(negedge clk);
      rd_addr = 8'h00; #0.1; check(rdata == w_st, "S_t readback");
      rd_addr = 8'h10; #0.1; check(rdata == w_sb, "S_b readback");
      rd_addr = 8'h21; #0.1; check(rdata == w_t1, "tune_t word 1 readback");
      rd_addr = 8'h30; #0.1; check(rdata == w_b0, "tune_b word 0 readback");
      rd_addr = 8'h55; #0.1; check(rdata == 32'd0, "unmapped read");
      check(s_t == w_st[N-1:0], "s_t output");
      check(s_b == w_sb[N-1:0], "s_b output");
      check(tune_t == {w_t1[15:0], w_t0}, "tune_t output");
      check(tune_b == {w_b1[15:0], w_b0}, "tune_b output");
    end
    n_start = 0;
    wr(8'h40, 32'h0000_0002);   // measuring mode, start
    @(negedge clk);
    check(cmd == CMD_MEAS, "mode 0 gives measuring command");
    check(n_start == 1, $sformatf("start pulses %0d", n_start));
    wr(8'h40, 32'h0000_0001);   // checking-bit mode, no start
    @(negedge clk);
    check(cmd == CMD_CB && n_start == 1, "mode 1 without start");
    rd_addr = 8'h40; #0.1; check(rdata == 32'd1, "CTRL readback");
    busy = 1'b1; done = 1'b0; cb = 1'b1; c1 = 16'd1234; c2 = 16'd4321;
    rd_addr = 8'h41; #0.1; check(rdata == 32'b101, "STATUS");
    busy = 1'b0; done = 1'b1; cb = 1'b0;
    rd_addr = 8'h41; #0.1; check(rdata == 32'b010, "STATUS 2");
    rd_addr = 8'h42; #0.1; check(rdata == 32'd1234, "C1");
    rd_addr = 8'h43; #0.1; check(rdata == 32'd4321, "C2");
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
