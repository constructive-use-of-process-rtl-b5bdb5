// arbiter_dff_tb: races two edges with random spacings (as small as 1 fs either
// way). cb must be 1 when out_t rises before out_b and 0 when it rises after; the
// asynchronous reset must clear cb.
module arbiter_dff_tb;
  timeunit 1ns;
  timeprecision 1fs;

  logic out_t = 1'b0, out_b = 1'b0, rst = 1'b1, cb;
  int checks = 0, failures = 0;

  arbiter_dff dut (.out_t(out_t), .out_b(out_b), .rst(rst), .cb(cb));

  initial begin
    #1 rst = 1'b0;
    #1;
    for (int r = 0; r < 200; r++) begin
      int unsigned gap_fs;
      bit top_first;
      gap_fs = 1 + $urandom % 200_000;
      top_first = 1'($urandom % 2);
      rst = 1'b1; #1; rst = 1'b0; #1;
      checks++;
      if (cb !== 1'b0) begin failures++; $display("FAIL: reset did not clear cb"); end
      if (top_first) begin
        out_t = 1'b1; #(real'(gap_fs) / 1.0e6); out_b = 1'b1;
      end else begin
        out_b = 1'b1; #(real'(gap_fs) / 1.0e6); out_t = 1'b1;
      end
      #1;
      checks++;
      if (cb !== top_first) begin
        failures++; $display("FAIL: top_first=%b gap=%0d fs cb=%b", top_first, gap_fs, cb);
      end
      out_t = 1'b0; out_b = 1'b0; #1;
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
