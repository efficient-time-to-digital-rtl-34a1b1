`timescale 1ps/1fs
// tb_sub_tdl: builds sampled tap vectors of a wave-union pulse (ones, a run
// of zeros, ones) at random positions along the line, with the sum taps in
// their inverted polarity, and checks that Sub-TDL Rising and Sub-TDL
// Falling return, for every sub-TDL, the taps passed by the trailing and the
// leading edge respectively. A few random vectors with bubbles check the
// first-zero / last-zero rule directly.
module tb_sub_tdl;
  import tdc_pkg::*;
  localparam int unsigned N = 60;
  localparam int unsigned NT = 8 * N;
  localparam int unsigned NS = n_sub(1'b1);
  logic clk = 0;
  logic [NT-1:0] q_co, q_o;
  logic [N-1:0] sub_r [NS], sub_f [NS];
  int checks = 0, failures = 0;

  sub_tdl #(.N_CY8(N), .DS(1'b1), .EDGE(EDGE_RISING))  dut_r (.clk, .q_co, .q_o, .sub(sub_r));
  sub_tdl #(.N_CY8(N), .DS(1'b1), .EDGE(EDGE_FALLING)) dut_f (.clk, .q_co, .q_o, .sub(sub_f));
  always #1000 clk = ~clk;

  // Level seen by a sub-TDL bit (carry polarity) for tap index j.
  function automatic bit lvl(input logic [NT-1:0] c, input logic [NT-1:0] so, input int s, input int i);
    return (s % 2 == 0) ? !so[8*i + s/2] : c[8*i + s/2];
  endfunction

  task automatic check_vectors(input logic [NT-1:0] c, input logic [NT-1:0] so);
    q_co = c; q_o = so;
    @(posedge clk); #1;
    for (int s = 0; s < NS; s++) begin
      automatic int first0 = N, last0 = -1;
      logic [N-1:0] er, ef;
      for (int i = N - 1; i >= 0; i--) if (!lvl(c, so, s, i)) first0 = i;
      for (int i = 0; i < N; i++)      if (!lvl(c, so, s, i)) last0 = i;
      er = '0; ef = '0;
      for (int i = 0; i < first0; i++) er[i] = 1'b1;
      for (int i = 0; i <= last0; i++) ef[i] = 1'b1;
      checks += 2;
      if (sub_r[s] !== er) begin failures++; $display("rising s=%0d got %h exp %h", s, sub_r[s], er); end
      if (sub_f[s] !== ef) begin failures++; $display("falling s=%0d got %h exp %h", s, sub_f[s], ef); end
    end
  endtask

  initial begin
    for (int t = 0; t < 60; t++) begin
      // Pulse in "time" units: the carry tap j sits at position 2j+1, the
      // sum tap j at 2j (half a stage earlier).
      automatic int pr = $urandom_range(2*NT);
      automatic int pf = pr + $urandom_range(2*NT - pr);
      logic [NT-1:0] c, so;
      for (int j = 0; j < NT; j++) begin
        c[j]  = !((2*j+1) >= pr && (2*j+1) < pf);
        so[j] = ((2*j) >= pr && (2*j) < pf);   // sum taps inverted
      end
      check_vectors(c, so);
    end
    for (int t = 0; t < 20; t++) begin
      logic [NT-1:0] c, so;
      for (int j = 0; j < NT; j += 32) begin c[j +: 32] = $urandom | $urandom; so[j +: 32] = $urandom & $urandom; end
      check_vectors(c, so);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin repeat (1000) @(posedge clk); failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
endmodule
