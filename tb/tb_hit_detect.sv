`timescale 1ps/1fs
// tb_hit_detect: plays sequences of sampled carry taps for the wave-union
// line (idle 1, negative pulse entering and leaving) and for the plain line
// (idle 0, long hit) and checks that valid rises exactly in the cycle after
// the first sample with the measured edge inside the line, once per hit.
module tb_hit_detect;
  localparam int unsigned N = 60;
  localparam int unsigned NT = 8 * N;
  logic clk = 0, rst = 1;
  logic [NT-1:0] q_wu, q_pl;
  logic v_wu, v_pl;
  int checks = 0, failures = 0;

  hit_detect #(.N_CY8(N), .WU(1'b1)) dut_wu (.clk, .rst, .q_co(q_wu), .valid(v_wu));
  hit_detect #(.N_CY8(N), .WU(1'b0)) dut_pl (.clk, .rst, .q_co(q_pl), .valid(v_pl));
  always #1000 clk = ~clk;

  // taps [lo, hi) at level 'in', others at '~in'
  function automatic logic [NT-1:0] band(input int lo, input int hi, input bit in);
    logic [NT-1:0] v;
    for (int j = 0; j < NT; j++) v[j] = (j >= lo && j < hi) ? in : !in;
    return v;
  endfunction

  // apply one sample; expected valid outputs one cycle later
  task automatic step(input logic [NT-1:0] wu, input logic [NT-1:0] pl, input bit ewu, input bit epl);
    q_wu = wu; q_pl = pl;
    @(posedge clk); #1;
    checks += 2;
    if (v_wu !== ewu) begin failures++; $display("%t wu valid %b exp %b", $realtime, v_wu, ewu); end
    if (v_pl !== epl) begin failures++; $display("%t plain valid %b exp %b", $realtime, v_pl, epl); end
  endtask

  initial begin
    q_wu = '1; q_pl = '0;
    repeat (2) @(posedge clk);
    rst = 0;
    for (int h = 0; h < 20; h++) begin
      automatic int p = $urandom_range(NT-1, 1);
      automatic bit lead_only = h % 2;             // leading edge alone in the first sample
      step('1, '0, 0, 0);                // idle
      if (lead_only) step(band(0, p, 1'b0), band(0, p, 1'b1), 0, 1);
      step(band(5, p + 5 < NT ? p + 5 : NT, 1'b0), '1, 1'b1, lead_only ? 1'b0 : 1'b1);
      step(band(NT - 3, NT, 1'b0), '1, 0, 0);  // pulse leaving, hit still high
      step('1, band(0, 10, 1'b0), 0, 0);       // falling hit edge on the plain line
      step('1, '0, 0, 0);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin repeat (1000) @(posedge clk); failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
endmodule
