`timescale 1ps/1fs
// calib_bram: calibration memory of the bin compensation / binning method.
//
// Addressed by the fine code of a hit, it returns the calibration factors of
// that code: BCF_m, the main corrected bin that receives the hit, and BCF_c,
// a compensation bin that also receives a count when the actual bin straddles
// an ideal-bin boundary (c_valid = 0 marks BCF_c as void). m_valid = 0 marks
// a code that is never counted. The host computes the factors from a
// code-density test and loads them through the write port; the same memory
// holds either the compensation table (ideal bins one LSB wide) or the
// binning table (ideal bins merged two by two).
// Word layout {m_valid, bcf_m, c_valid, bcf_c} is this design's choice.
// Timing: synchronous read, data one cycle after rd_en (block RAM); the
// input valid is delayed alongside as out_valid.
module calib_bram #(
  parameter int unsigned CODE_W = 11,   // fine-code width (address)
  parameter int unsigned BIN_W  = 11    // corrected-bin width
) (
  input  logic              clk,
  input  logic              rst,
  // host load port
  input  logic              we,
  input  logic [CODE_W-1:0] waddr,
  input  logic              wm_valid,
  input  logic [BIN_W-1:0]  wbcf_m,
  input  logic              wc_valid,
  input  logic [BIN_W-1:0]  wbcf_c,
  // lookup
  input  logic              rd_en,
  input  logic [CODE_W-1:0] raddr,
  output logic              out_valid,
  output logic              m_valid,
  output logic [BIN_W-1:0]  bcf_m,
  output logic              c_valid,
  output logic [BIN_W-1:0]  bcf_c
);
  typedef struct packed {
    logic             m_valid;
    logic [BIN_W-1:0] bcf_m;
    logic             c_valid;
    logic [BIN_W-1:0] bcf_c;
  } calib_word_t;

  calib_word_t mem [2**CODE_W];
  calib_word_t q;

  always_ff @(posedge clk) begin
    if (we) mem[waddr] <= '{m_valid: wm_valid, bcf_m: wbcf_m, c_valid: wc_valid, bcf_c: wbcf_c};
  end

  always_ff @(posedge clk) begin
    if (rd_en) q <= mem[raddr];
  end

  always_ff @(posedge clk) begin
    if (rst) out_valid <= 1'b0;
    else     out_valid <= rd_en;
  end

  assign m_valid = q.m_valid;
  assign bcf_m   = q.bcf_m;
  assign c_valid = q.c_valid;
  assign bcf_c   = q.bcf_c;
endmodule
