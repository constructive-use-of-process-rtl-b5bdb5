// host_regs: the register file through which a host configures the delay line and
// reads results. All path-selecting bits and fine-tuning bits are written before a
// pulse is applied; a write to CTRL with bit 1 set starts one operation in the mode
// given by bit 0 (1: checking-bit generation, 0: delay measuring).
// Word map (32-bit words, word address addr):
//   0x00 + k  S_t   bits [32k+31:32k]          (NWS = ceil(N/32) words)
//   0x10 + k  S_b
//   0x20 + k  tune_t, stage i in bits [3i+2:3i] (NWT = ceil(3N/32) words), bit 3i+j = I(3+j)
//   0x30 + k  tune_b
//   0x40      CTRL    bit0 mode, bit1 start (write-only, self-clearing)
//   0x41      STATUS  bit0 busy, bit1 done, bit2 cb (read-only)
//   0x42      C1      top-loop count (read-only)
//   0x43      C2      bottom-loop count (read-only)
// Writes take effect at the next clk edge; reads are combinational from rd_addr.
// Unmapped reads return 0. The host link itself (PCIe in the prototype) is outside
// this block, and the map is this design's own.
module host_regs
  import dl_pkg::*;
#(
  parameter int unsigned N     = 16,
  parameter int unsigned CNT_W = 16
) (
  input  logic                      clk,
  input  logic                      rst,
  input  logic                      wr_en,
  input  logic [7:0]                wr_addr,
  input  logic [31:0]               wdata,
  input  logic [7:0]                rd_addr,
  output logic [31:0]               rdata,
  output logic [N-1:0]              s_t,
  output logic [N-1:0]              s_b,
  output logic [N-1:0][TUNE_W-1:0]  tune_t,
  output logic [N-1:0][TUNE_W-1:0]  tune_b,
  output cmd_e                      cmd,
  output logic                      start,
  input  logic                      busy,
  input  logic                      done,
  input  logic                      cb,
  input  logic [CNT_W-1:0]          c1,
  input  logic [CNT_W-1:0]          c2
);
  timeunit 1ns;
  timeprecision 1fs;

  localparam int unsigned NWS = (N + 31) / 32;
  localparam int unsigned NWT = (TUNE_W * N + 31) / 32;

  localparam logic [7:0] A_ST   = 8'h00;
  localparam logic [7:0] A_SB   = 8'h10;
  localparam logic [7:0] A_TT   = 8'h20;
  localparam logic [7:0] A_TB   = 8'h30;
  localparam logic [7:0] A_CTRL = 8'h40;
  localparam logic [7:0] A_STAT = 8'h41;
  localparam logic [7:0] A_C1   = 8'h42;
  localparam logic [7:0] A_C2   = 8'h43;

  logic [NWS*32-1:0] st_r, sb_r;
  logic [NWT*32-1:0] tt_r, tb_r;
  logic              mode_r;

  initial begin
    assert (NWS <= 16 && NWT <= 16) else $error("host_regs: N too large for the word map");
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      st_r   <= '0;
      sb_r   <= '0;
      tt_r   <= '0;
      tb_r   <= '0;
      mode_r <= 1'b1;
      start  <= 1'b0;
    end else begin
      start <= 1'b0;
      if (wr_en) begin
        for (int unsigned k = 0; k < NWS; k++) begin
          if (wr_addr == A_ST + 8'(k)) st_r[32*k +: 32] <= wdata;
          if (wr_addr == A_SB + 8'(k)) sb_r[32*k +: 32] <= wdata;
        end
        for (int unsigned k = 0; k < NWT; k++) begin
          if (wr_addr == A_TT + 8'(k)) tt_r[32*k +: 32] <= wdata;
          if (wr_addr == A_TB + 8'(k)) tb_r[32*k +: 32] <= wdata;
        end
        if (wr_addr == A_CTRL) begin
          mode_r <= wdata[0];
          start  <= wdata[1];
        end
      end
    end
  end

  always_comb begin
    rdata = '0;
    for (int unsigned k = 0; k < NWS; k++) begin
      if (rd_addr == A_ST + 8'(k)) rdata = st_r[32*k +: 32];
      if (rd_addr == A_SB + 8'(k)) rdata = sb_r[32*k +: 32];
    end
    for (int unsigned k = 0; k < NWT; k++) begin
      if (rd_addr == A_TT + 8'(k)) rdata = tt_r[32*k +: 32];
      if (rd_addr == A_TB + 8'(k)) rdata = tb_r[32*k +: 32];
    end
    case (rd_addr)
      A_CTRL:  rdata = {31'd0, mode_r};
      A_STAT:  rdata = {29'd0, cb, done, busy};
      A_C1:    rdata = 32'(c1);
      A_C2:    rdata = 32'(c2);
      default: ;
    endcase
  end

  assign s_t    = st_r[N-1:0];
  assign s_b    = sb_r[N-1:0];
  assign tune_t = tt_r[TUNE_W*N-1:0];
  assign tune_b = tb_r[TUNE_W*N-1:0];
  assign cmd    = mode_r ? CMD_CB : CMD_MEAS;
endmodule
