// lut6_mux_tb: exhaustive test of the LUT6 mux tree. The default-INIT instance must
// be a 2:1 MUX (I2 ? I1 : I0) for every value of the programmable inputs I3..I5;
// a second instance with a random INIT must return INIT[{I5..I0}] for all 64
// inputs, which checks the order of the tree levels.
module lut6_mux_tb;
  timeunit 1ns;
  timeprecision 1fs;

  localparam logic [63:0] RND = 64'hC3A5_9F01_7E2D_B468;

  logic [5:0] i;
  logic       o_mux, o_rnd;
  int checks = 0, failures = 0;

  lut6_mux              u_mux (.i(i), .o(o_mux));
  lut6_mux #(.INIT(RND)) u_rnd (.i(i), .o(o_rnd));

  initial begin
    for (int k = 0; k < 64; k++) begin
      i = 6'(k);
      #1;
      checks += 2;
      if (o_mux !== (i[2] ? i[1] : i[0])) begin
        failures++; $display("FAIL: mux i=%b o=%b", i, o_mux);
      end
      if (o_rnd !== RND[k]) begin
        failures++; $display("FAIL: rnd i=%b o=%b", i, o_rnd);
      end
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
