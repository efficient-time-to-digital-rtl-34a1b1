`timescale 1ps/1fs
// tb_calib_bram: loads a table of random calibration words through the host
// port, reads random addresses back and checks data and the one-cycle read
// latency (out_valid).
module tb_calib_bram;
  localparam int unsigned CW = 11;
  logic clk = 0, rst = 1;
  logic we = 0, wm_valid, wc_valid, rd_en = 0, out_valid, m_valid, c_valid;
  logic [CW-1:0] waddr, wbcf_m, wbcf_c, raddr, bcf_m, bcf_c;
  logic [2*CW+1:0] ref_mem [2**CW];
  int checks = 0, failures = 0;

  calib_bram #(.CODE_W(CW), .BIN_W(CW)) dut (.*);
  always #1000 clk = ~clk;

  initial begin
    repeat (2) @(posedge clk); #1 rst = 0;
    for (int a = 0; a < 2**CW; a++) begin
      automatic logic [2*CW+1:0] w = {$urandom, $urandom};
      ref_mem[a] = w;
      we = 1; waddr = CW'(a);
      {wm_valid, wbcf_m, wc_valid, wbcf_c} = w;
      @(posedge clk); #1;
    end
    we = 0;
    for (int t = 0; t < 400; t++) begin
      automatic logic [CW-1:0] a = CW'($urandom);
      rd_en = 1; raddr = a;
      @(posedge clk); #1;
      rd_en = 0; raddr = CW'($urandom);
      checks++;
      if (!out_valid || {m_valid, bcf_m, c_valid, bcf_c} !== ref_mem[a]) begin
        failures++; $display("addr %0d got %h exp %h v=%b", a, {m_valid, bcf_m, c_valid, bcf_c}, ref_mem[a], out_valid);
      end
      @(posedge clk); #1;
      checks++;
      if (out_valid) begin failures++; $display("out_valid stuck"); end
      if ({m_valid, bcf_m, c_valid, bcf_c} !== ref_mem[a]) begin failures++; $display("data changed without rd_en"); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin repeat (10000) @(posedge clk); failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
endmodule
