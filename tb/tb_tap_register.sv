`timescale 1ps/1fs
// tb_tap_register: random tap vectors must appear on q_co/q_o one clock
// edge after they are applied, and not before.
module tb_tap_register;
  localparam int unsigned N = 60;
  logic clk = 0;
  logic [8*N-1:0] co, o, q_co, q_o, pco, po;
  int checks = 0, failures = 0;

  tap_register #(.N_CY8(N), .DS(1'b1)) dut (.clk, .co, .o, .q_co, .q_o);
  always #1000 clk = ~clk;

  function automatic logic [8*N-1:0] rnd();
    logic [8*N-1:0] v;
    for (int i = 0; i < 8*N; i += 32) v[i +: 32] = $urandom;
    return v;
  endfunction

  initial begin
    co = rnd(); o = rnd();
    @(posedge clk);
    for (int t = 0; t < 100; t++) begin
      #10;
      pco = co; po = o;
      co = rnd(); o = rnd();
      checks++;
      if (q_co != pco || q_o != po) begin failures++; $display("t=%0d before edge mismatch", t); end
      @(posedge clk); #1;
      checks++;
      if (q_co != co || q_o != o) begin failures++; $display("t=%0d after edge mismatch", t); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin repeat (1000) @(posedge clk); failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
endmodule
