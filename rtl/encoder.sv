`timescale 1ps/1fs
// encoder: turns the sub-TDL codes of one edge into its fine code.
//
// One tm2bin per sub-TDL converts its thermometer code to a count; the
// counts of all sub-TDLs are added (Sum). Because sub-TDL k samples tap k of
// every CARRY8, the sum counts every tap the edge has passed, giving
// 8*N_CY8 (16*N_CY8 with dual sampling) equivalent taps while each sub-TDL
// stays bubble-free. Structure (TM2BIN per sub-TDL, then Sum) follows the
// published encoder; the two pipeline stages are this design's choice.
// Timing: counts registered after the tm2bins, sum registered: latency 2.
module encoder
  import tdc_pkg::*;
#(
  parameter int unsigned N_CY8 = N_CY8_DEFAULT,
  parameter bit          DS    = 1'b1
) (
  input  logic                           clk,
  input  logic [N_CY8-1:0]               sub [n_sub(DS)],
  output logic [edge_code_w(N_CY8,DS)-1:0] code
);
  localparam int unsigned NS = n_sub(DS);
  localparam int unsigned BW = $clog2(N_CY8 + 1);
  localparam int unsigned CW = edge_code_w(N_CY8, DS);

  logic [BW-1:0] cnt   [NS];
  logic [BW-1:0] cnt_q [NS];

  for (genvar s = 0; s < NS; s++) begin : g_t2b
    tm2bin #(.N(N_CY8)) u_tm2bin (.therm(sub[s]), .bin(cnt[s]));
  end

  always_ff @(posedge clk) cnt_q <= cnt;

  always_ff @(posedge clk) begin
    logic [CW-1:0] acc;
    acc = '0;
    for (int unsigned s = 0; s < NS; s++) acc += CW'(cnt_q[s]);
    code <= acc;
  end
endmodule
