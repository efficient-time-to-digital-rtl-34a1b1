`timescale 1ps/1fs
// tb_wu_launcher: a rising hit edge must give a negative pulse on wu that
// starts with the hit edge and lasts BUF_DELAY_PS; a falling hit edge must
// leave wu high. Edge times are recorded and compared.
module tb_wu_launcher;
  localparam real BUF = 300.0;
  logic hit = 0, wu;
  realtime t_fall, t_rise;
  int n_fall = 0, n_rise = 0;
  int checks = 0, failures = 0;

  wu_launcher #(.BUF_DELAY_PS(BUF)) dut (.hit, .wu);

  // Edge times, polled every 0.5 ps.
  initial begin
    logic pw;
    pw = wu;
    forever begin
      #0.5;
      if (pw && !wu) begin t_fall = $realtime; n_fall++; end
      if (!pw && wu) begin t_rise = $realtime; n_rise++; end
      pw = wu;
    end
  end

  initial begin
    #1000;
    checks++;
    if (wu !== 1'b1) begin failures++; $display("wu not idle high"); end
    for (int h = 0; h < 20; h++) begin
      realtime t0;
      int nf, nr;
      nf = n_fall; nr = n_rise;
      #(500.0 + h * 37.25);
      t0 = $realtime;
      hit = 1;
      #(BUF / 2);
      checks++;
      if (wu !== 1'b0) begin failures++; $display("no pulse at hit %0d", h); end
      #(BUF);
      checks += 3;
      if (n_fall != nf + 1 || n_rise != nr + 1) begin failures++; $display("edge count"); end
      if (t_fall - t0 > 0.6) begin failures++; $display("pulse start %f", t_fall - t0); end
      if ((t_rise - t_fall) < BUF - 0.6 || (t_rise - t_fall) > BUF + 0.6) begin
        failures++; $display("pulse width %f", t_rise - t_fall);
      end
      #(700.0);
      nf = n_fall;
      hit = 0;
      #(2 * BUF);
      checks++;
      if (n_fall != nf || wu !== 1'b1) begin failures++; $display("falling hit edge disturbed wu"); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin #1000000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
endmodule
