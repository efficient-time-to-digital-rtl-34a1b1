`timescale 1ps/1fs
// hist_bank: one simple-dual-port block RAM of histogram counters with a
// read-modify-write increment path.
//
// inc adds one to counter inc_addr: the counter is read in the cycle inc is
// accepted and the incremented value written in the next. If the following
// increment hits the same address, the value just written is forwarded, so
// back-to-back hits on one bin are all counted (one increment per cycle).
// clr writes zero to clr_addr (takes the write port). When no increment is
// issued, rd_en uses the read port for the host readout; rd_data is valid one
// cycle later. Increments, clear and readout must not be issued together;
// the parent arbitrates. This bank realises one port of the published
// histogram; the pipeline and forwarding are this design's choice.
module hist_bank #(
  parameter int unsigned AW      = 11,
  parameter int unsigned COUNT_W = 32
) (
  input  logic               clk,
  input  logic               rst,
  input  logic               inc,
  input  logic [AW-1:0]      inc_addr,
  input  logic               clr,
  input  logic [AW-1:0]      clr_addr,
  input  logic               rd_en,
  input  logic [AW-1:0]      rd_addr,
  output logic [COUNT_W-1:0] rd_data
);
  logic [COUNT_W-1:0] mem [2**AW];
  logic [COUNT_W-1:0] q;          // registered read data
  logic               s1_valid;   // increment waiting for its write
  logic [AW-1:0]      s1_addr;
  logic               wr_valid;   // write done at the last edge
  logic [AW-1:0]      wr_addr;
  logic [COUNT_W-1:0] wr_data;
  logic [COUNT_W-1:0] base, next;

  // Read port: increments first, then host readout.
  always_ff @(posedge clk) begin
    if (inc)        q <= mem[inc_addr];
    else if (rd_en) q <= mem[rd_addr];
  end
  assign rd_data = q;

  // Forward the value written at the last edge (the read above returned the
  // old contents for that address).
  assign base = (wr_valid && wr_addr == s1_addr) ? wr_data : q;
  assign next = base + 1'b1;

  always_ff @(posedge clk) begin
    if (clr)           mem[clr_addr] <= '0;
    else if (s1_valid) mem[s1_addr]  <= next;
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      s1_valid <= 1'b0;
      wr_valid <= 1'b0;
    end else begin
      s1_valid <= inc;
      wr_valid <= s1_valid | clr;
    end
    s1_addr <= inc_addr;
    wr_addr <= clr ? clr_addr : s1_addr;
    wr_data <= clr ? '0 : next;
  end

  assert property (@(posedge clk) disable iff (rst) !(inc && rd_en))
    else $error("hist_bank: increment and readout issued together");
  assert property (@(posedge clk) disable iff (rst) !(clr && (inc || s1_valid)))
    else $error("hist_bank: clear collides with an increment");
endmodule
