`timescale 1ps/1fs
// ring_oscillator: behavioural model of the jitter test structure: one LUT
// configured as an inverter followed by M carry-chain delay elements, closed
// into a loop and brought out to a pin for an oscilloscope.
//
// This is a timing model, not synthesizable logic. While en is high the
// output toggles every half period; each half period is the LUT delay plus
// M element delays, with Gaussian jitter whose variance is
// SIGMA_LUT^2 + M * SIGMA_CY^2 (the jitter of one pass through the loop).
// The jitter figures (1.45 ps for the LUT, 0.16 ps per delay element) are the
// published measurements; the mean delays, M and the seed are this model's
// choices. en low stops the loop with out low.
module ring_oscillator #(
  parameter int unsigned M            = 64,
  parameter real         LUT_DELAY_PS = 100.0,
  parameter real         CY_DELAY_PS  = 4.79,
  parameter real         SIGMA_LUT_PS = 1.45,
  parameter real         SIGMA_CY_PS  = 0.16,
  parameter int          SEED         = 1
) (
  input  logic en,
  output logic out
);
  localparam real HALF_PS  = LUT_DELAY_PS + M * CY_DELAY_PS;
  localparam real SIGMA_PS = $sqrt(SIGMA_LUT_PS * SIGMA_LUT_PS + M * SIGMA_CY_PS * SIGMA_CY_PS);

  int seed = SEED;

  initial begin
    out = 1'b0;
    forever begin
      if (!en) begin
        out = 1'b0;
        @(posedge en);
      end
      // half period in fs with Gaussian jitter
      #(real'($dist_normal(seed, int'(HALF_PS * 1000.0), int'(SIGMA_PS * 1000.0))) / 1000.0);
      if (en) out = ~out;
    end
  end
endmodule
