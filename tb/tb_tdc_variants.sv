`timescale 1ps/1fs
// tb_tdc_variants: the two other published TDC variants built from the same
// RTL: the WU TDC (carry taps only, wave union: DS = 0, WU = 1) and the
// DS TDC (carry and sum taps, hit fed straight into the line: DS = 1,
// WU = 0). Both see the same random hits. With an identity calibration table
// each must give one timestamp per hit (no hit left without one), a fine code spanning about one clock
// period (700 to 960 codes, about 2.4 ps per code) and a fine code that is a
// straight-line function of the hit time (residual rms below 2 ps).
module tb_tdc_variants;
  import tdc_pkg::*;
  localparam real T_CLK = 2000.0;
  localparam int  CW_WU = code_w(N_CY8_DEFAULT, 1'b0, 1'b1);
  localparam int  CW_DS = code_w(N_CY8_DEFAULT, 1'b1, 1'b0);
  localparam int  N_HITS = 1500;

  logic clk = 0, rst = 1, hit = 0, cal_we = 0;
  logic [CW_WU-1:0] a_wu = '0;
  logic [CW_DS-1:0] a_ds = '0;
  logic ts_v [2];
  logic [15:0] ts_c [2];
  logic [CW_WU-1:0] f_wu, b_wu;
  logic [CW_DS-1:0] f_ds, b_ds;
  logic unused_wu [8], unused_ds [8];
  logic [32:0] rdw, rdd;
  logic [CW_WU-1:0] bc_wu;
  logic [CW_DS-1:0] bc_ds;

  tdc_top #(.DS(1'b0), .WU(1'b1)) u_wu (
    .clk, .rst, .hit,
    .cal_we, .cal_addr(a_wu), .cal_m_valid(1'b1), .cal_bcf_m(a_wu), .cal_c_valid(1'b0), .cal_bcf_c(a_wu),
    .hist_clear(1'b0), .hist_busy(unused_wu[0]), .rd_req(1'b0), .rd_addr(a_wu),
    .rd_ack(unused_wu[1]), .rd_valid(unused_wu[2]), .rd_data(rdw),
    .ts_valid(ts_v[0]), .ts_coarse(ts_c[0]), .ts_fine(f_wu), .ts_m_valid(unused_wu[3]), .ts_bin(b_wu),
    .ts_c_valid(unused_wu[4]), .ts_bin_c(bc_wu), .ro_en(1'b0), .ro_out(unused_wu[5]));

  tdc_top #(.DS(1'b1), .WU(1'b0)) u_ds (
    .clk, .rst, .hit,
    .cal_we, .cal_addr(a_ds), .cal_m_valid(1'b1), .cal_bcf_m(a_ds), .cal_c_valid(1'b0), .cal_bcf_c(a_ds),
    .hist_clear(1'b0), .hist_busy(unused_ds[0]), .rd_req(1'b0), .rd_addr(a_ds),
    .rd_ack(unused_ds[1]), .rd_valid(unused_ds[2]), .rd_data(rdd),
    .ts_valid(ts_v[1]), .ts_coarse(ts_c[1]), .ts_fine(f_ds), .ts_m_valid(unused_ds[3]), .ts_bin(b_ds),
    .ts_c_valid(unused_ds[4]), .ts_bin_c(bc_ds), .ro_en(1'b0), .ro_out(unused_ds[5]));

  always #(T_CLK / 2) clk = ~clk;

  int checks = 0, failures = 0;
  realtime hit_t [2][$];
  int n_seen [2] = '{0, 0};
  int fmin [2] = '{100000, 100000}, fmax [2] = '{-1, -1};
  real sx [2], sy [2], sxx [2], sxy [2];
  real rx [2][$], ry [2][$];
  bit running = 0;

  initial begin
    forever begin
      wait (running);
      #(6000.0 + real'($urandom_range(1999999)) / 1000.0);
      if (running) begin
        hit_t[0].push_back($realtime);
        hit_t[1].push_back($realtime);
        hit = 1;
        #(3100.0);
        hit = 0;
      end
    end
  end

  task automatic record(input int v, input int f, input logic [15:0] c, input int b);
    realtime th;
    real tc, y;
    n_seen[v]++;
    checks += 2;
    if (b != f) begin failures++; $display("variant %0d: identity table lookup wrong", v); end
    if (hit_t[v].size() == 0) begin failures++; $display("variant %0d: timestamp without hit", v); return; end
    th = hit_t[v].pop_front();
    tc = real'(c) * T_CLK;
    while (th - tc > 32768.0 * T_CLK) tc += 65536.0 * T_CLK;
    y = th - tc;
    sx[v] += f; sy[v] += y; sxx[v] += real'(f) * f; sxy[v] += real'(f) * y;
    rx[v].push_back(real'(f)); ry[v].push_back(y);
    if (f < fmin[v]) fmin[v] = f;
    if (f > fmax[v]) fmax[v] = f;
  endtask

  always @(posedge clk) begin
    if (!rst && ts_v[0]) record(0, int'(f_wu), ts_c[0], int'(b_wu));
    if (!rst && ts_v[1]) record(1, int'(f_ds), ts_c[1], int'(b_ds));
  end

  initial begin
    repeat (4) @(posedge clk);
    @(negedge clk) rst = 0;
    for (int a = 0; a < 2**CW_DS; a++) begin
      @(negedge clk); cal_we = 1; a_wu = CW_WU'(a); a_ds = CW_DS'(a);
    end
    @(negedge clk); cal_we = 0;
    running = 1;
    while (n_seen[0] < N_HITS) @(posedge clk);
    running = 0;
    repeat (20) @(posedge clk);
    for (int v = 0; v < 2; v++) begin
      real n, slope, icpt, rms;
      n = real'(rx[v].size());
      slope = (n * sxy[v] - sx[v] * sy[v]) / (n * sxx[v] - sx[v] * sx[v]);
      icpt = (sy[v] - slope * sx[v]) / n;
      rms = 0;
      foreach (rx[v][i]) begin
        automatic real r = ry[v][i] - (icpt + slope * rx[v][i]);
        rms += r * r;
      end
      rms = $sqrt(rms / n);
      $display("%s TDC: %0d hits, codes %0d..%0d, %0.3f ps per code, residual rms %0.2f ps",
               v == 0 ? "WU" : "DS", n_seen[v], fmin[v], fmax[v], -slope, rms);
      checks += 4;
      if (hit_t[v].size() != 0 || n_seen[v] != n_seen[0]) begin failures++; $display("hits without timestamp"); end
      if (fmax[v] - fmin[v] < 700 || fmax[v] - fmin[v] > 960) begin failures++; $display("code span wrong"); end
      if (-slope < 2.0 || -slope > 2.8) begin failures++; $display("LSB wrong"); end
      if (rms > 2.0) begin failures++; $display("not linear"); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
