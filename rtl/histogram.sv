`timescale 1ps/1fs
// histogram: on-chip histogram of calibrated hits for code-density tests.
//
// Each hit carries a main corrected bin (BCF_m) and, when the actual bin
// straddles an ideal-bin boundary, a compensation bin (BCF_c). Port A adds
// one to bin BCF_m and port B adds one to bin BCF_c, in the same cycle. The
// two ports are two separate simple-dual-port RAM banks, so they never
// collide; the host readout returns the sum of both banks for a bin.
//
// Interface and timing:
//   in_valid       one hit per cycle at most; dropped while busy.
//   clear          starts a sweep that zeroes every bin of both banks; busy
//                  stays high for 2**AW + 1 cycles.
//   rd_req/rd_addr host readout; accepted (rd_ack) in cycles with no hit and
//                  no clear; rd_valid/rd_data follow one cycle after rd_ack.
// Two banks, the +1 read-modify-write of each port and the BCF_m/BCF_c
// addressing follow the published compensation hardware; clear sweep and
// readout arbitration are this design's choice.
module histogram #(
  parameter int unsigned AW      = 11,
  parameter int unsigned COUNT_W = 32
) (
  input  logic               clk,
  input  logic               rst,
  input  logic               in_valid,
  input  logic               m_valid,
  input  logic [AW-1:0]      bcf_m,
  input  logic               c_valid,
  input  logic [AW-1:0]      bcf_c,
  input  logic               clear,
  output logic               busy,
  input  logic               rd_req,
  input  logic [AW-1:0]      rd_addr,
  output logic               rd_ack,
  output logic               rd_valid,
  output logic [COUNT_W:0]   rd_data
);
  typedef enum logic [1:0] {S_RUN, S_DRAIN, S_SWEEP} state_e;
  state_e        state;
  logic [AW-1:0] clr_addr;
  logic          clr;
  logic          accept;
  logic [COUNT_W-1:0] qa, qb;

  assign busy   = (state != S_RUN);
  assign clr    = (state == S_SWEEP);
  assign accept = in_valid & ~busy;
  assign rd_ack = rd_req & ~in_valid & ~busy;

  always_ff @(posedge clk) begin
    if (rst) begin
      state    <= S_RUN;
      clr_addr <= '0;
      rd_valid <= 1'b0;
    end else begin
      rd_valid <= rd_ack;
      unique case (state)
        S_RUN:   if (clear) state <= S_DRAIN;
        S_DRAIN: begin
          state    <= S_SWEEP;       // let an increment in flight finish
          clr_addr <= '0;
        end
        S_SWEEP: begin
          clr_addr <= clr_addr + 1'b1;
          if (&clr_addr) state <= S_RUN;
        end
        default: state <= S_RUN;
      endcase
    end
  end

  hist_bank #(.AW(AW), .COUNT_W(COUNT_W)) u_port_a (
    .clk, .rst,
    .inc(accept & m_valid), .inc_addr(bcf_m),
    .clr, .clr_addr,
    .rd_en(rd_ack), .rd_addr,
    .rd_data(qa)
  );

  hist_bank #(.AW(AW), .COUNT_W(COUNT_W)) u_port_b (
    .clk, .rst,
    .inc(accept & c_valid), .inc_addr(bcf_c),
    .clr, .clr_addr,
    .rd_en(rd_ack), .rd_addr,
    .rd_data(qb)
  );

  assign rd_data = {1'b0, qa} + {1'b0, qb};
endmodule
