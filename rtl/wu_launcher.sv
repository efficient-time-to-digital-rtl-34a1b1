`timescale 1ps/1fs
// wu_launcher: behavioural model of the LUT-based wave-union (WU-A) launcher.
//
// This is a timing model, not synthesizable logic: in the FPGA the delay is
// the routing/buffer path into one LUT input. The hit drives LUT input B
// directly and input A through a delay buffer. The LUT truth table
// (A,B -> Out: 00->1, 01->0, 10->1, 11->1) is Out = A | ~B, so a rising hit
// edge produces a negative pulse of width BUF_DELAY_PS on Out: a falling edge
// followed by a rising edge, the two edges that travel down the delay line.
// The falling hit edge leaves Out at 1 (idle level).
//
// Truth table and buffer placement follow the published launcher; the buffer
// delay (pulse width) is this model's choice, picked wider than the worst-case
// drift between rising and falling edges along the line.
module wu_launcher #(
  parameter real BUF_DELAY_PS = 300.0
) (
  input  logic hit,   // hit signal
  output logic wu     // wave-union signal into the delay line
);
  logic a;  // delayed copy of hit (LUT input A)

  initial a = 1'b0;
  always @(hit) a <= #(BUF_DELAY_PS) hit;

  // LUT function: B = hit
  assign wu = a | ~hit;
endmodule
