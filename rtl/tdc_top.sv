`timescale 1ps/1fs
// tdc_top: single-channel dual-sampling wave-union TDC (DSWU) with on-chip
// bin compensation / binning and histogram.
//
// A hit enters the wave-union launcher, which sends a short negative pulse
// (a falling and a rising edge) into a 60-CARRY8 tapped delay line. Every
// 2 ns the carry and sum taps are sampled. The Sub-TDL Falling and Sub-TDL
// Rising paths each regroup the taps into 16 bubble-free sub-TDLs and keep
// the code of one edge; two encoders turn them into the positions of the two
// edges, and their sum is the fine code: two edges times two taps per stage
// give 32 equivalent taps per CARRY8, about 1.2 ps per code. A calibration
// BRAM maps each fine code to a main (BCF_m) and a compensation (BCF_c)
// corrected bin; the histogram counts both. Loading a compensation table
// gives the compensated TDC, loading a table built on ideal bins merged two
// by two gives the binned TDC, with no change in hardware. A coarse counter
// stamps each hit with the clock cycle it was sampled in.
//
// Beside the TDC sits the ring oscillator used to measure the jitter of
// LUTs and carry elements (ro_en, ro_out); it shares no logic with the TDC.
//
// Parameters DS and WU select the other published variants: WU = 0 feeds
// the hit straight into the line and drops the falling path (DS TDC);
// DS = 0 samples carry taps only (WU TDC).
//
// Pipeline (rising clock edges after the sampling edge):
//   +1 sub-TDL codes, hit_detect valid   +3 edge codes
//   +4 fine code                          +5 calibration factors, ts_* outputs
//   histogram write two cycles after that.
// The launcher and delay line are timing models of FPGA primitives (see
// wu_launcher and carry8_tdl); everything after the tap flip-flops is
// synthesizable. hit must stay high or low for longer than one clock period
// plus the launcher pulse between edges.
module tdc_top
  import tdc_pkg::*;
#(
  parameter int unsigned N_CY8    = N_CY8_DEFAULT,
  parameter bit          DS       = 1'b1,
  parameter bit          WU       = 1'b1,
  parameter int unsigned COUNT_W  = 32,
  parameter int unsigned COARSE_W = 16,
  localparam int unsigned CW      = code_w(N_CY8, DS, WU),
  localparam int unsigned EW      = edge_code_w(N_CY8, DS)
) (
  input  logic                clk,
  input  logic                rst,
  input  logic                hit,
  // calibration table load (host)
  input  logic                cal_we,
  input  logic [CW-1:0]       cal_addr,
  input  logic                cal_m_valid,
  input  logic [CW-1:0]       cal_bcf_m,
  input  logic                cal_c_valid,
  input  logic [CW-1:0]       cal_bcf_c,
  // histogram control and readout (host)
  input  logic                hist_clear,
  output logic                hist_busy,
  input  logic                rd_req,
  input  logic [CW-1:0]       rd_addr,
  output logic                rd_ack,
  output logic                rd_valid,
  output logic [COUNT_W:0]    rd_data,
  // per-hit timestamp
  output logic                ts_valid,
  output logic [COARSE_W-1:0] ts_coarse,
  output logic [CW-1:0]       ts_fine,
  output logic                ts_m_valid,
  output logic [CW-1:0]       ts_bin,
  output logic                ts_c_valid,
  output logic [CW-1:0]       ts_bin_c,
  // ring-oscillator jitter test structure (independent of the TDC)
  input  logic                ro_en,
  output logic                ro_out
);
  localparam int unsigned NS = n_sub(DS);

  // ---------------- delay line and tap flip-flops ----------------
  logic                line_in;
  logic [8*N_CY8-1:0]  co, o, q_co, q_o;

  if (WU) begin : g_launch
    wu_launcher u_launcher (.hit, .wu(line_in));
  end else begin : g_direct
    assign line_in = hit;
  end

  carry8_tdl #(.N_CY8(N_CY8), .IDLE(WU)) u_tdl (.ci(line_in), .co, .o);

  tap_register #(.N_CY8(N_CY8), .DS(DS)) u_taps (.clk, .co, .o, .q_co, .q_o);

  // ---------------- Sub-TDL Rising / Falling and encoders ----------------
  logic [N_CY8-1:0] sub_r [NS];
  logic [EW-1:0]    code_r;
  logic [CW-1:0]    fine;

  sub_tdl #(.N_CY8(N_CY8), .DS(DS), .EDGE(EDGE_RISING)) u_sub_r (
    .clk, .q_co, .q_o, .sub(sub_r));
  encoder #(.N_CY8(N_CY8), .DS(DS)) u_enc_r (.clk, .sub(sub_r), .code(code_r));

  if (WU) begin : g_falling
    logic [N_CY8-1:0] sub_f [NS];
    logic [EW-1:0]    code_f;
    sub_tdl #(.N_CY8(N_CY8), .DS(DS), .EDGE(EDGE_FALLING)) u_sub_f (
      .clk, .q_co, .q_o, .sub(sub_f));
    encoder #(.N_CY8(N_CY8), .DS(DS)) u_enc_f (.clk, .sub(sub_f), .code(code_f));
    // Wave union: the fine code is the sum of both edge positions.
    always_ff @(posedge clk) fine <= CW'(code_r) + CW'(code_f);
  end else begin : g_single
    always_ff @(posedge clk) fine <= CW'(code_r);
  end

  // ---------------- measurement valid and coarse time ----------------
  logic                valid1;       // +1
  logic [2:0]          vpipe;        // +2..+4
  logic [COARSE_W-1:0] count, stamp;
  logic                stamp_valid;
  logic [COARSE_W-1:0] stamp_d [3];  // stamp is +2, aligned to +5 below

  hit_detect #(.N_CY8(N_CY8), .WU(WU)) u_detect (.clk, .rst, .q_co, .valid(valid1));

  coarse_counter #(.W(COARSE_W)) u_coarse (
    .clk, .rst, .capture(valid1), .count, .stamp_valid, .stamp);

  always_ff @(posedge clk) begin
    if (rst) vpipe <= '0;
    else     vpipe <= {vpipe[1:0], valid1};
    stamp_d[0] <= stamp;
    stamp_d[1] <= stamp_d[0];
    stamp_d[2] <= stamp_d[1];
  end

  // ---------------- calibration BRAM ----------------
  logic          cal_valid;
  logic          bcf_m_valid, bcf_c_valid;
  logic [CW-1:0] bcf_m, bcf_c;
  logic [CW-1:0] fine_d;

  calib_bram #(.CODE_W(CW), .BIN_W(CW)) u_calib (
    .clk, .rst,
    .we(cal_we), .waddr(cal_addr), .wm_valid(cal_m_valid), .wbcf_m(cal_bcf_m),
    .wc_valid(cal_c_valid), .wbcf_c(cal_bcf_c),
    .rd_en(vpipe[2]), .raddr(fine),
    .out_valid(cal_valid), .m_valid(bcf_m_valid), .bcf_m, .c_valid(bcf_c_valid), .bcf_c);

  always_ff @(posedge clk) fine_d <= fine;

  // ---------------- histogram ----------------
  histogram #(.AW(CW), .COUNT_W(COUNT_W)) u_hist (
    .clk, .rst,
    .in_valid(cal_valid), .m_valid(bcf_m_valid), .bcf_m, .c_valid(bcf_c_valid), .bcf_c,
    .clear(hist_clear), .busy(hist_busy),
    .rd_req, .rd_addr, .rd_ack, .rd_valid, .rd_data);

  assign ts_valid   = cal_valid;
  assign ts_coarse  = stamp_d[2];
  assign ts_fine    = fine_d;
  assign ts_m_valid = bcf_m_valid;
  assign ts_bin     = bcf_m;
  assign ts_c_valid = bcf_c_valid;
  assign ts_bin_c   = bcf_c;

  // ---------------- jitter test structure ----------------
  ring_oscillator u_ro (.en(ro_en), .out(ro_out));

  logic unused;
  assign unused = ^count ^ stamp_valid;
endmodule
