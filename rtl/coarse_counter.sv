`timescale 1ps/1fs
// coarse_counter: counts system-clock cycles to extend the measuring range
// beyond one clock period.
//
// The counter advances every cycle and wraps at 2**W. When capture is high
// the current count is stored in stamp and stamp_valid pulses one cycle
// later. A hit's time is then stamp * T_clk minus the fine-code time, where
// the fine code measures how long before the sampling edge the hit came.
// The published system shows a coarse counter clocked by the system clock
// beside the fine TDC; its width and capture interface are this design's.
module coarse_counter #(
  parameter int unsigned W = 16
) (
  input  logic         clk,
  input  logic         rst,
  input  logic         capture,
  output logic [W-1:0] count,
  output logic         stamp_valid,
  output logic [W-1:0] stamp
);
  always_ff @(posedge clk) begin
    if (rst) begin
      count       <= '0;
      stamp_valid <= 1'b0;
      stamp       <= '0;
    end else begin
      count       <= count + 1'b1;
      stamp_valid <= capture;
      if (capture) stamp <= count;
    end
  end
endmodule
