`timescale 1ps/1fs
// tb_histogram: sends hits with random main/compensation bins, including
// runs of back-to-back hits on one bin and hits whose two bins coincide,
// keeps its own histogram, then reads every bin back (checking the read
// latency and the arbitration against hits) and compares. Also checks the
// clear sweep: its busy length and an all-zero histogram afterwards.
module tb_histogram;
  localparam int unsigned AW = 6;
  localparam int unsigned CW = 16;
  logic clk = 0, rst = 1;
  logic in_valid = 0, m_valid = 0, c_valid = 0, clear = 0, busy;
  logic [AW-1:0] bcf_m, bcf_c, rd_addr;
  logic rd_req = 0, rd_ack, rd_valid;
  logic [CW:0] rd_data;
  int ref_h [2**AW];
  int checks = 0, failures = 0;

  histogram #(.AW(AW), .COUNT_W(CW)) dut (.*);
  always #1000 clk = ~clk;

  task automatic do_clear();
    automatic int n = 0;
    clear = 1; @(posedge clk); #1; clear = 0;
    while (busy) begin @(posedge clk); #1; n++; end
    checks++;
    if (n != 2**AW + 1) begin failures++; $display("clear busy for %0d cycles, exp %0d", n, 2**AW + 1); end
    foreach (ref_h[i]) ref_h[i] = 0;
  endtask

  task automatic send(input bit mv, input int m, input bit cv, input int c);
    in_valid = 1; m_valid = mv; bcf_m = AW'(m); c_valid = cv; bcf_c = AW'(c);
    if (mv) ref_h[m]++;
    if (cv) ref_h[c]++;
    @(posedge clk); #1;
    in_valid = 0; m_valid = $urandom; c_valid = $urandom;
  endtask

  task automatic read_all(input string what);
    for (int a = 0; a < 2**AW; a++) begin
      rd_req = 1; rd_addr = AW'(a);
      // a hit in the same cycle must win the read port
      if (a % 7 == 3) begin
        in_valid = 1; m_valid = 0; c_valid = 0;
        #1; checks++;
        if (rd_ack) begin failures++; $display("readout accepted during a hit"); end
        @(posedge clk); #1; in_valid = 0;
      end
      #1; checks++;
      if (!rd_ack) begin failures++; $display("readout not accepted"); end
      @(posedge clk); #1;
      rd_req = 0;
      checks++;
      if (!rd_valid || int'(rd_data) != ref_h[a]) begin
        failures++; $display("%s bin %0d got %0d exp %0d v=%b", what, a, rd_data, ref_h[a], rd_valid);
      end
    end
  endtask

  initial begin
    repeat (2) @(posedge clk); #1 rst = 0;
    do_clear();
    for (int t = 0; t < 3000; t++) begin
      automatic int m = $urandom_range(2**AW - 1);
      automatic int c = (t % 5 == 0) ? m : int'($urandom_range(2**AW - 1));
      automatic int run = (t % 11 == 0) ? 4 : 1;
      for (int r = 0; r < run; r++) send($urandom_range(9) != 0, m, $urandom_range(1), c);
      repeat ($urandom_range(2)) @(posedge clk);
      #1;
    end
    repeat (3) @(posedge clk); #1;
    read_all("filled");
    do_clear();
    read_all("cleared");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin repeat (20000) @(posedge clk); failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
endmodule
