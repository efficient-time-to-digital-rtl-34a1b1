`timescale 1ps/1fs
// tb_tm2bin: checks the ones counter against $countones on thermometer codes
// of every length and on random codes (with bubbles).
module tb_tm2bin;
  localparam int unsigned N = 60;
  logic [N-1:0] therm;
  logic [$clog2(N+1)-1:0] bin;
  int checks = 0, failures = 0;

  tm2bin #(.N(N)) dut (.therm, .bin);

  initial begin
    for (int p = 0; p <= N; p++) begin
      therm = (p == N) ? '1 : ((N'(1) << p) - 1);
      #1;
      checks++;
      if (int'(bin) != p) begin failures++; $display("therm len %0d -> %0d", p, bin); end
    end
    for (int t = 0; t < 500; t++) begin
      therm = {$urandom, $urandom};
      #1;
      checks++;
      if (int'(bin) != $countones(therm)) begin failures++; $display("rand %h -> %0d", therm, bin); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin #1000000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
endmodule
