`timescale 1ps/1fs
// tb_encoder: drives random sub-TDL codes into the dual-sampling encoder
// (16 sub-TDLs of 60 bits) and checks the sum of ones two cycles later.
module tb_encoder;
  import tdc_pkg::*;
  localparam int unsigned N = 60;
  localparam int unsigned NS = n_sub(1'b1);
  logic clk = 0;
  logic [N-1:0] sub [NS];
  logic [edge_code_w(N,1'b1)-1:0] code;
  int expq [$];
  int checks = 0, failures = 0;

  encoder #(.N_CY8(N), .DS(1'b1)) dut (.clk, .sub, .code);
  always #1000 clk = ~clk;

  initial begin
    for (int t = 0; t < 300; t++) begin
      automatic int e = 0;
      for (int s = 0; s < NS; s++) begin
        automatic int len = (t < 50) ? (t + s) % (N + 1) : int'($urandom_range(N));
        sub[s] = (len == N) ? '1 : ((N'(1) << len) - 1);
        e += len;
      end
      expq.push_back(e);
      @(posedge clk); #1;
      if (t >= 1) begin  // vector t-1 was applied two edges ago
        automatic int x = expq.pop_front();
        checks++;
        if (int'(code) != x) begin failures++; $display("t=%0d code %0d exp %0d", t, code, x); end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin repeat (1000) @(posedge clk); failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
endmodule
