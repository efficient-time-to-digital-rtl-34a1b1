`timescale 1ps/1fs
// tb_ring_oscillator: runs the loop for 4000 half periods and checks the
// mean half period (LUT delay + M element delays) and its standard deviation
// against sqrt(sigma_LUT^2 + M*sigma_CY^2), and that disabling stops it.
module tb_ring_oscillator;
  localparam int unsigned M = 64;
  localparam real HALF  = 100.0 + M * 4.79;
  localparam real SIGMA = 1.8553;   // sqrt(1.45^2 + 64 * 0.16^2)
  logic en = 0, out;
  int checks = 0, failures = 0;
  realtime last;
  real s = 0, ss = 0;
  int n = 0;

  ring_oscillator #(.M(M)) dut (.en, .out);

  initial begin
    #1000;
    checks++;
    if (out !== 1'b0) begin failures++; $display("running while disabled"); end
    en = 1;
    last = $realtime;
    while (n < 4000) begin
      real h;
      @(out);
      h = $realtime - last;
      last = $realtime;
      s += h; ss += h * h;
      n++;
    end
    begin
      real mean, sd;
      mean = s / n;
      sd = $sqrt(ss / n - mean * mean);
      $display("half period %0.3f ps (exp %0.3f), jitter %0.3f ps (exp %0.3f)", mean, HALF, sd, SIGMA);
      checks += 2;
      if (mean < HALF - 0.2 || mean > HALF + 0.2) begin failures++; $display("mean half period wrong"); end
      if (sd < SIGMA * 0.9 || sd > SIGMA * 1.1) begin failures++; $display("jitter wrong"); end
    end
    en = 0;
    #2000;
    n = 0;
    fork
      begin @(out); n = 1; end
      #5000;
    join_any
    disable fork;
    checks++;
    if (n != 0 || out !== 1'b0) begin failures++; $display("did not stop"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin #10000000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
endmodule
