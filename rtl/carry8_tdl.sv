`timescale 1ps/1fs
// carry8_tdl: behavioural model of a tapped delay line built from N_CY8
// chained CARRY8 primitives.
//
// This is a timing model of FPGA carry logic, not synthesizable. All select
// inputs are 1, so the carry ripples from ci through 8*N_CY8 stages. Tap j
// (stage j, counted from ci) has a carry output co[j] and a sum output
// o[j] = ~(carry into stage j). Rising and falling transitions propagate at
// different speed: a fast edge takes TAP_FAST_PS per stage on average and the
// slow edge TAP_SLOW_PS, the values measured for 20 nm UltraScale devices.
// Which of the two is the rising edge is this model's choice (FALL_IS_SLOW).
// The stage delays are uneven inside a CARRY8 (fixed weight pattern) and
// vary slightly from CARRY8 to CARRY8, so neighbouring taps can be nearly
// coincident, as on real silicon; the weight pattern is this model's own.
// The sum output of stage j switches half a stage delay after the carry
// into stage j, so C and S taps interleave (dual sampling).
//
// Each tap is written by two processes, one scheduling the rising and one
// the falling transition with its own transport delay; synthesis tools
// report these as multiple drivers, which is expected for this timing model.
//
// Interface: ci in (held at IDLE until the first edge); co/o out, bit j = stage j, stage 8*i+k = CARRY8[i] tap k.
module carry8_tdl #(
  parameter int unsigned N_CY8        = tdc_pkg::N_CY8_DEFAULT,
  parameter real         TAP_FAST_PS  = 4.79,
  parameter real         TAP_SLOW_PS  = 5.08,
  parameter bit          FALL_IS_SLOW = 1'b1,
  parameter bit          IDLE         = 1'b0   // level of ci before the first edge
) (
  input  logic                  ci,
  output logic [8*N_CY8-1:0]    co,
  output logic [8*N_CY8-1:0]    o
);
  localparam int unsigned NT = 8 * N_CY8;

  // Relative delay of stage j (mean 1.0).
  function automatic real weight(input int unsigned j);
    real pat [8] = '{0.55, 1.45, 0.80, 1.20, 0.35, 1.65, 0.90, 1.10};
    int cy = int'(j / 8);
    real var_cy = 1.0 + 0.04 * real'((((cy * 37) + 11) % 9) - 4) / 4.0;
    return pat[j % 8] * var_cy;
  endfunction

  // Arrival time (in units of the mean stage delay) of the carry at the output
  // of stage j, and of the sum output of stage j.
  function automatic real t_co(input int unsigned j);
    real t = 0.0;
    for (int unsigned i = 0; i <= j; i++) t += weight(i);
    return t;
  endfunction

  function automatic real t_o(input int unsigned j);
    return t_co(j) - 0.5 * weight(j);
  endfunction

  localparam real T_RISE = FALL_IS_SLOW ? TAP_FAST_PS : TAP_SLOW_PS;
  localparam real T_FALL = FALL_IS_SLOW ? TAP_SLOW_PS : TAP_FAST_PS;

  for (genvar j = 0; j < NT; j++) begin : g_stage
    localparam real DC = t_co(j);
    localparam real DO = t_o(j);
    initial begin
      co[j] = IDLE;
      o[j]  = ~IDLE;
    end
    // Transport delays: every edge of ci reaches each tap after its own delay.
    always @(posedge ci) begin
      co[j] <= #(DC * T_RISE) 1'b1;
      o[j]  <= #(DO * T_RISE) 1'b0;
    end
    always @(negedge ci) begin
      co[j] <= #(DC * T_FALL) 1'b0;
      o[j]  <= #(DO * T_FALL) 1'b1;
    end
  end
endmodule
