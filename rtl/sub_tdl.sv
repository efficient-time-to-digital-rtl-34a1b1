`timescale 1ps/1fs
// sub_tdl: splits the sampled delay-line code into sub-TDL thermometer codes
// and extracts the code of one edge of the launched signal.
//
// Sub-TDL C[k] gathers carry tap k of every CARRY8 (bit i = CARRY8[i]); with
// dual sampling (DS = 1) sub-TDL S[k] gathers sum tap k the same way. Taps of
// one sub-TDL are a whole CARRY8 apart, far more than the timing mismatch
// between neighbouring taps, so each sub-TDL code is a clean thermometer code
// without bubbles. Sum taps have inverted polarity (o = ~carry-in) and are
// inverted back here so every sub-TDL reads like a carry sub-TDL.
// Sub-TDL order: with DS, index 2k is S[k] and 2k+1 is C[k]; without DS,
// index k is C[k].
//
// EDGE_RISING  keeps the bits the 0->1 transition has passed:
//              r[i] = x[0] & x[1] & ... & x[i]   (leading run of ones).
// EDGE_FALLING keeps the bits the 1->0 transition has passed:
//              f[i] = ~x[i] | ~x[i+1] | ... | ~x[N-1]   (up to the last zero).
// With a wave-union pulse (1..1 0..0 1..1 from the line input onwards) the
// two variants give the positions of the trailing rising edge and the leading
// falling edge. Without WU the hit's own rising edge gives 1..1 0..0, which
// EDGE_RISING passes unchanged.
//
// The sub-TDL grouping and the Rising/Falling split follow the published
// design; the prefix/suffix extraction is this design's own reading of what
// the Rising and Falling modules do. Timing: one register stage.
module sub_tdl
  import tdc_pkg::*;
#(
  parameter int unsigned N_CY8 = N_CY8_DEFAULT,
  parameter bit          DS    = 1'b1,
  parameter edge_e       EDGE  = EDGE_RISING
) (
  input  logic                      clk,
  input  logic [8*N_CY8-1:0]        q_co,   // sampled carry taps
  input  logic [8*N_CY8-1:0]        q_o,    // sampled sum taps
  output logic [N_CY8-1:0]          sub [n_sub(DS)]  // edge codes per sub-TDL
);
  localparam int unsigned NS = n_sub(DS);

  logic [N_CY8-1:0] raw [NS];
  logic [N_CY8-1:0] edg [NS];

  // Regrouping: sub-TDL bit i is tap k of CARRY8[i].
  always_comb begin
    for (int unsigned s = 0; s < NS; s++) begin
      for (int unsigned i = 0; i < N_CY8; i++) begin
        if (DS) begin
          raw[s][i] = (s % 2 == 0) ? ~q_o[8*i + s/2] : q_co[8*i + s/2];
        end else begin
          raw[s][i] = q_co[8*i + s];
        end
      end
    end
  end

  // Edge extraction.
  always_comb begin
    for (int unsigned s = 0; s < NS; s++) begin
      if (EDGE == EDGE_RISING) begin
        edg[s][0] = raw[s][0];
        for (int unsigned i = 1; i < N_CY8; i++) edg[s][i] = edg[s][i-1] & raw[s][i];
      end else begin
        edg[s][N_CY8-1] = ~raw[s][N_CY8-1];
        for (int i = int'(N_CY8) - 2; i >= 0; i--) edg[s][i] = edg[s][i+1] | ~raw[s][i];
      end
    end
  end

  always_ff @(posedge clk) sub <= edg;

  if (!DS) begin : g_nods
    logic unused;
    assign unused = ^q_o;
  end
endmodule
