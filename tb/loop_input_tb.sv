// loop_input_tb: exhaustive check of the loop entry: pulse input when mux_sel = 1,
// feedback when 0, feedback forced low by rst1, output forced low by rst2.
module loop_input_tb;
  timeunit 1ns;
  timeprecision 1fs;

  logic pulse_in, fb, mux_sel, rst1, rst2, y;
  int checks = 0, failures = 0;

  loop_input dut (.pulse_in(pulse_in), .fb(fb), .mux_sel(mux_sel), .rst1(rst1), .rst2(rst2), .y(y));

  initial begin
    for (int k = 0; k < 32; k++) begin
      logic e;
      {pulse_in, fb, mux_sel, rst1, rst2} = 5'(k);
      #1;
      if (rst2)         e = 1'b0;
      else if (mux_sel) e = pulse_in;
      else if (rst1)    e = 1'b0;
      else              e = fb;
      checks++;
      if (y !== e) begin failures++; $display("FAIL: in=%b y=%b want %b", 5'(k), y, e); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #10000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
