`timescale 1ps/1fs
// tdc_pkg: constants and types shared by the tapped-delay-line TDC.
//
// The TDC samples a 60-stage CARRY8 delay line at 500 MHz. Every CARRY8 offers
// eight carry taps (C) and eight sum taps (S). Taps are regrouped into
// sub-TDLs: sub-TDL C[k] holds tap k of every CARRY8, so neighbouring bits in a
// sub-TDL are one full CARRY8 delay apart. The number of CARRY8s, the clock
// rate and the 8-taps-per-primitive split follow the published design; the
// calibration word layout is this design's own choice.
package tdc_pkg;

  // Taps per CARRY8 primitive (C or S outputs).
  localparam int unsigned TAPS_PER_CY8 = 8;
  // Default number of CARRY8s in the delay line (60 slices of one clock region).
  localparam int unsigned N_CY8_DEFAULT = 60;

  // Which transition of the launched signal a Sub-TDL module follows.
  typedef enum logic {
    EDGE_RISING  = 1'b0,   // 0->1 transition (the hit edge itself without WU)
    EDGE_FALLING = 1'b1    // 1->0 transition (leading edge of the WU pulse)
  } edge_e;

  // Number of sub-TDLs: 8 with C taps only, 16 with dual sampling (C and S).
  function automatic int unsigned n_sub(input bit ds);
    return ds ? 2 * TAPS_PER_CY8 : TAPS_PER_CY8;
  endfunction

  // Width of the fine code of one edge: sum of n_sub popcounts of n_cy8 bits.
  function automatic int unsigned edge_code_w(input int unsigned n_cy8, input bit ds);
    return $clog2(n_sub(ds) * n_cy8 + 1);
  endfunction

  // Width of the combined fine code (one edge, or the sum of two with WU).
  function automatic int unsigned code_w(input int unsigned n_cy8, input bit ds, input bit wu);
    return wu ? $clog2(2 * n_sub(ds) * n_cy8 + 1) : edge_code_w(n_cy8, ds);
  endfunction

endpackage
