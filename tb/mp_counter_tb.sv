// mp_counter_tb: four 250 MHz phases 0.5 ns apart clock the counter while a random
// two-level signal with high and low times of 0.5 to 3 ns (edges placed between
// sampling instants) is applied. Over random enable windows the count must equal
// exactly the number of rising edges of the signal between the sample before the
// window and the last sample in it; clear must zero the count and the count must
// hold while en is low.
module mp_counter_tb;
  timeunit 1ns;
  timeprecision 1fs;

  localparam int unsigned CNT_W = 16;

  logic [3:0] clk = '0;
  logic rst = 1'b1, sig = 1'b0, clear = 1'b0, en = 1'b0;
  logic [CNT_W-1:0] count;
  int checks = 0, failures = 0;
  realtime rises[$];

  mp_counter #(.CNT_W(CNT_W)) dut (.clk(clk), .rst(rst), .sig(sig), .clear(clear), .en(en), .count(count));

  for (genvar g = 0; g < 4; g++) begin : g_clk
    initial begin
      #(0.5 * g + 2.0);
      forever begin clk[g] = 1'b1; #2.0; clk[g] = 1'b0; #2.0; end
    end
  end

  initial begin
    #0.25;
    forever begin
      #(0.5 * (1 + $urandom % 6));
      sig = ~sig;
      if (sig) rises.push_back($realtime);
    end
  end

  initial begin
    repeat (3) @(posedge clk[0]);
    #0.1 rst = 1'b0;
    for (int w = 0; w < 30; w++) begin
      realtime e0, e1;
      int exp_n, len;
      logic [CNT_W-1:0] held;
      @(posedge clk[0]); #0.1 clear = 1'b1;
      @(posedge clk[0]); #0.1 clear = 1'b0;
      checks++;
      if (count !== '0) begin failures++; $display("FAIL: clear"); end
      len = 1 + $urandom % 60;
      @(posedge clk[0]); e0 = $realtime; #0.1 en = 1'b1;
      repeat (len) @(posedge clk[0]);
      e1 = $realtime; #0.1 en = 1'b0;
      exp_n = 0;
      foreach (rises[k]) if (rises[k] > e0 - 0.5 && rises[k] < e1 - 0.5) exp_n++;
      #1;
      checks++;
      if (int'(count) != exp_n) begin
        failures++; $display("FAIL: window %0d: count %0d want %0d", w, count, exp_n);
      end
      held = count;
      repeat (3) @(posedge clk[0]);
      checks++;
      if (count !== held) begin failures++; $display("FAIL: count moved while en low"); end
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
