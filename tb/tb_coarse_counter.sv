`timescale 1ps/1fs
// tb_coarse_counter: counts cycles independently and checks the captured
// stamp (value of the counter at the capture edge), stamp_valid timing and
// wrap-around of an 8-bit counter.
module tb_coarse_counter;
  localparam int unsigned W = 8;
  logic clk = 0, rst = 1, capture = 0, stamp_valid;
  logic [W-1:0] count, stamp;
  int cyc = 0, checks = 0, failures = 0;

  coarse_counter #(.W(W)) dut (.*);
  always #1000 clk = ~clk;

  initial begin
    repeat (2) @(posedge clk); #1 rst = 0;
    // count is 0 now; after k more edges it is k mod 2**W
    for (int t = 0; t < 300; t++) begin
      automatic int k = $urandom_range(5, 1);
      repeat (k) @(posedge clk);
      cyc += k;
      #1 capture = 1;
      @(posedge clk); #1;       // the stamp is the count seen at this edge
      capture = 0;
      checks++;
      if (!stamp_valid || stamp !== W'(cyc)) begin failures++; $display("stamp %0d exp %0d v=%b", stamp, W'(cyc), stamp_valid); end
      cyc += 1;
      checks++;
      if (count !== W'(cyc)) begin failures++; $display("count %0d exp %0d", count, W'(cyc)); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin repeat (5000) @(posedge clk); failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
endmodule
