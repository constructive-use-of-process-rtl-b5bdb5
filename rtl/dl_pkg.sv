// dl_pkg: types, constants and helper functions shared by the process-variation
// delay line. It holds
//   * the LUT6 truth table that turns a 6-input LUT into a 2:1 MUX whose function
//     does not depend on the three programmable inputs I3..I5 (the "fine tuning
//     bits"), so that those bits move an edge through a different physical path of
//     the LUT without changing the logic value;
//   * the command and state encodings of the measurement controller;
//   * a deterministic stand-in for process variation: a hash that gives each MUX
//     channel and each tuning path of each stage a fixed delay around a nominal
//     value. Only the behavioural delay models and the testbenches use it.
// The 250 MHz counter clock, the 4 counter clock phases, N = 16 stages, 3 tuning
// bits per stage and the 10 us measurement window follow the FPGA prototype. The
// nominal delays and the size of the variation are this design's own numbers.
package dl_pkg;
  timeunit 1ns;
  timeprecision 1fs;

  // Number of fine-tuning (programmable) LUT inputs per stage: I3, I4, I5.
  localparam int unsigned TUNE_W = 3;

  // Controller commands and states.
  typedef enum logic [1:0] {
    CMD_NONE = 2'd0,
    CMD_CB   = 2'd1,   // checking-bit generation (mode = 1)
    CMD_MEAS = 2'd2    // delay measurement (mode = 0)
  } cmd_e;

  typedef enum logic [2:0] {
    ST_IDLE   = 3'd0,
    ST_RESET  = 3'd1,  // reset gates asserted to clear residual oscillation
    ST_LAUNCH = 3'd2,  // pulse driven into both paths
    ST_SETTLE = 3'd3,  // checking-bit mode: wait for the edges to reach the DFF
    ST_COUNT  = 3'd4,  // measuring mode: loops oscillate, counters run for t_c
    ST_STOP   = 3'd5   // loops cleared, results held
  } state_e;

  // LUT6 contents for a 2:1 MUX on I0 (channel 0), I1 (channel 1) and I2 (select),
  // replicated for all eight values of I5..I3: INIT[k] = k[2] ? k[1] : k[0].
  function automatic logic [63:0] mux_lut_init();
    logic [63:0] init;
    for (int k = 0; k < 64; k++) begin
      init[k] = k[2] ? k[1] : k[0];
    end
    return init;
  endfunction

  // ---- process-variation stand-in (behavioural models and testbenches only) ----
  localparam int unsigned NOMINAL_CH_FS   = 400_000; // nominal channel delay, 400 ps
  localparam int unsigned SPREAD_CH_FS    = 30_000;  // channel delay uniform in +-15 ps
  localparam int unsigned NOMINAL_TUNE_FS = 3_000;   // per tuning bit level, 3 ps
  localparam int unsigned SPREAD_TUNE_FS  = 3_000;   // +-1.5 ps

  // 32-bit integer hash (xorshift-multiply), used to draw repeatable "random" delays.
  function automatic int unsigned pv_hash(input int unsigned x);
    int unsigned h;
    h = x * 32'h9E37_79B1;
    h = h ^ (h >> 15);
    h = h * 32'h85EB_CA6B;
    h = h ^ (h >> 13);
    h = h * 32'hC2B2_AE35;
    h = h ^ (h >> 16);
    return h;
  endfunction

  // Delay in fs of channel ch (0 or 1) of stage idx of path p (0 top, 1 bottom).
  function automatic int unsigned ch_delay_fs(input int unsigned seed, input int unsigned p,
                                              input int unsigned idx, input int unsigned ch);
    int unsigned h;
    h = pv_hash(seed ^ pv_hash((p << 24) ^ (idx << 4) ^ ch));
    return NOMINAL_CH_FS - SPREAD_CH_FS / 2 + (h % (SPREAD_CH_FS + 1));
  endfunction

  // Extra delay in fs of the LUT-tree path picked by the tuning bits of a stage:
  // each bit adds one of two slightly different level delays.
  function automatic int unsigned tune_delay_fs(input int unsigned seed, input int unsigned p,
                                                input int unsigned idx,
                                                input logic [TUNE_W-1:0] tune);
    int unsigned d;
    int unsigned h;
    d = 0;
    for (int unsigned b = 0; b < TUNE_W; b++) begin
      h = pv_hash(seed ^ pv_hash(32'h0100_0000 ^ (p << 20) ^ (idx << 8) ^ (b << 1)
                                 ^ int'(tune[b])));
      d += NOMINAL_TUNE_FS - SPREAD_TUNE_FS / 2 + (h % (SPREAD_TUNE_FS + 1));
    end
    return d;
  endfunction

  // Total propagation delay in fs of one stage for a given select and tuning value
  // (Eq. 3 of the linear additive delay model, plus the tuning path).
  function automatic int unsigned stage_delay_fs(input int unsigned seed, input int unsigned p,
                                                 input int unsigned idx, input logic sel,
                                                 input logic [TUNE_W-1:0] tune);
    return ch_delay_fs(seed, p, idx, int'(sel)) + tune_delay_fs(seed, p, idx, tune);
  endfunction
endpackage
