`timescale 1ps/1fs
// hit_detect: flags the clock sample that holds a new measurement.
//
// The delay line is slightly longer than one clock period, so the first
// sample taken after the measured edge has entered the line always holds it.
// Without WU the hit's rising edge is "present" once the first carry tap is 1.
// With WU the line idles at 1 and the launcher sends a negative pulse; the
// measurement is valid once the trailing rising edge has passed the first
// carry tap while a zero (the pulse) is still in the line, so both edges are
// inside the line. valid is raised for the first such sample only; the
// next measurement is armed once the line shows "not present" again.
// The published design does not describe this logic; it is this design's own.
// Timing: valid is registered, aligned with the output of sub_tdl (both are
// one cycle after the tap registers).
module hit_detect #(
  parameter int unsigned N_CY8 = tdc_pkg::N_CY8_DEFAULT,
  parameter bit          WU    = 1'b1
) (
  input  logic                 clk,
  input  logic                 rst,
  input  logic [8*N_CY8-1:0]   q_co,    // sampled carry taps
  output logic                 valid
);
  logic present, present_q;

  if (WU) begin : g_wu
    assign present = q_co[0] & ~(&q_co);
  end else begin : g_plain
    assign present = q_co[0];
    logic unused;
    assign unused = ^q_co[8*N_CY8-1:1];
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      present_q <= 1'b1;  // do not fire on whatever the line holds at reset
      valid     <= 1'b0;
    end else begin
      present_q <= present;
      valid     <= present & ~present_q;
    end
  end
endmodule
