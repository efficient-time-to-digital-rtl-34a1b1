`timescale 1ps/1fs
// tm2bin: thermometer-to-binary converter for one sub-TDL.
//
// Counts the ones of an N-bit code (ones counter). For the bubble-free
// sub-TDL codes this equals the position of the edge; counting ones instead
// of searching for the transition also keeps a stray bubble from shifting
// the result by more than one bin. Purely combinational.
// The converter's name and place follow the published encoder; the
// ones-counter realisation is this design's choice.
module tm2bin #(
  parameter int unsigned N = tdc_pkg::N_CY8_DEFAULT
) (
  input  logic [N-1:0]           therm,
  output logic [$clog2(N+1)-1:0] bin
);
  always_comb begin
    bin = '0;
    for (int unsigned i = 0; i < N; i++) bin += ($clog2(N+1))'(therm[i]);
  end
endmodule
