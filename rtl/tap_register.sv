`timescale 1ps/1fs
// tap_register: the flip-flops that capture every tap of the delay line.
//
// On each rising clock edge the carry (co) and sum (o) outputs of all
// 8*N_CY8 delay-line stages are stored, freezing a snapshot of where the
// launched edges have travelled. Without dual sampling only the carry taps
// are used, and the sum-tap register is left out (q_o reads 0).
// One register stage, no reset: the snapshot is overwritten every cycle.
// Sampling every tap on the system clock follows the published design.
module tap_register #(
  parameter int unsigned N_CY8 = tdc_pkg::N_CY8_DEFAULT,
  parameter bit          DS    = 1'b1
) (
  input  logic                 clk,
  input  logic [8*N_CY8-1:0]   co,     // carry taps from the delay line
  input  logic [8*N_CY8-1:0]   o,      // sum taps from the delay line
  output logic [8*N_CY8-1:0]   q_co,   // sampled carry taps
  output logic [8*N_CY8-1:0]   q_o     // sampled sum taps (0 if DS = 0)
);
  always_ff @(posedge clk) q_co <= co;

  if (DS) begin : g_ds
    always_ff @(posedge clk) q_o <= o;
  end else begin : g_nods
    assign q_o = '0;
    logic unused;
    assign unused = ^o;
  end
endmodule
