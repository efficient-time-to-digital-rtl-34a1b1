`timescale 1ps/1fs
// tb_carry8_tdl: launches a rising and then a falling edge into the
// 60-CARRY8 delay line model, records when every carry and sum tap switches,
// (polled every 0.05 ps) and checks: carry taps switch in order along the line; every sum tap
// switches (inverted) between the carry into its stage and its own carry
// output; the mean stage delay is 4.79 ps for the fast (rising) edge and
// 5.08 ps for the slow (falling) edge; and the line spans more than one
// 2 ns clock period.
module tb_carry8_tdl;
  localparam int unsigned N = 60;
  localparam int unsigned NT = 8 * N;
  logic ci = 0;
  logic [NT-1:0] co, o;
  realtime tc [NT], to [NT];
  int checks = 0, failures = 0;

  carry8_tdl #(.N_CY8(N)) dut (.ci, .co, .o);

  // Records switching times by polling every 0.05 ps.
  initial begin
    logic [NT-1:0] pc, po;
    pc = co; po = o;
    forever begin
      #0.05;
      for (int j = 0; j < NT; j++) begin
        if (co[j] != pc[j]) tc[j] = $realtime;
        if (o[j]  != po[j]) to[j] = $realtime;
      end
      pc = co; po = o;
    end
  end

  task automatic check_edge(input realtime t0, input real mean_ps, input bit lvl);
    checks++;
    if (co !== {NT{lvl}} || o !== {NT{!lvl}}) begin failures++; $display("line not settled at %b", lvl); end
    for (int j = 0; j < NT; j++) begin
      automatic realtime prev = (j == 0) ? t0 : tc[j-1];
      checks += 2;
      if (tc[j] < prev) begin failures++; $display("carry tap %0d out of order", j); end
      if (!(to[j] >= prev && to[j] <= tc[j])) begin failures++; $display("sum tap %0d at %f outside (%f, %f)", j, to[j], prev, tc[j]); end
    end
    checks++;
    if ((tc[NT-1] - t0) / NT < mean_ps * 0.98 || (tc[NT-1] - t0) / NT > mean_ps * 1.02) begin
      failures++; $display("mean stage delay %f exp %f", (tc[NT-1] - t0) / NT, mean_ps);
    end
    checks++;
    if (tc[NT-1] - t0 <= 2000.0) begin failures++; $display("line shorter than a clock period"); end
  endtask

  initial begin
    realtime t0;
    #100;
    checks++;
    if (co !== '0 || o !== '1) begin failures++; $display("idle levels wrong"); end
    t0 = $realtime; ci = 1;
    #5000;
    check_edge(t0, 4.79, 1'b1);
    t0 = $realtime; ci = 0;
    #5000;
    check_edge(t0, 5.08, 1'b0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin #1000000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
endmodule
