`timescale 1ps/1fs
// tb_tdc_top: end-to-end test of the DSWU TDC at its default size
// (60 CARRY8s, dual sampling, wave union, 500 MHz clock).
//
// Hits arrive at random, uncorrelated times (a code-density test). Three
// runs are made, each on a freshly cleared histogram:
//   1. identity calibration table: bin = fine code (raw histogram);
//   2. compensation table computed here from the bin widths measured in run 1
//      (ideal bins one average LSB wide, main + compensation factor);
//   3. binning table: the same rule with ideal bins two LSBs wide.
// In every run the testbench keeps its own histogram from the per-hit
// timestamps and its own copy of the table, and compares the whole hardware
// histogram with it. It also checks the timestamps against the true hit
// times: a straight-line fit of (hit time - coarse time) on the fine code must
// have a slope of about one LSB (1.0 .. 1.6 ps) and residuals within a few
// LSBs, and the fine code must span more than 1400 codes per clock period.
// Mechanisms counted (each must occur): both WU edges encoded in one sample,
// sum-tap (dual-sampling) sub-TDLs used, compensation factor applied, void
// compensation factor, binned run, histogram clear, histogram readout
// deferred by a hit. The ring oscillator beside the TDC is enabled for
// 100 ns and must toggle about once per 406 ps.
module tb_tdc_top;
  import tdc_pkg::*;
  localparam real T_CLK = 2000.0;
  localparam int  CW = code_w(N_CY8_DEFAULT, 1'b1, 1'b1);
  localparam int  NB = 2**CW;
  localparam int  N_HITS [3] = '{10000, 5000, 5000};

  logic clk = 0, rst = 1, hit = 0;
  logic cal_we = 0, cal_m_valid = 0, cal_c_valid = 0;
  logic [CW-1:0] cal_addr = '0, cal_bcf_m = '0, cal_bcf_c = '0;
  logic hist_clear = 0, hist_busy, rd_req = 0, rd_ack, rd_valid;
  logic [CW-1:0] rd_addr = '0;
  logic [32:0] rd_data;
  logic ts_valid, ts_m_valid, ts_c_valid;
  logic [15:0] ts_coarse;
  logic [CW-1:0] ts_fine, ts_bin, ts_bin_c;
  logic ro_en = 0, ro_out;
  int n_ro = 0;

  tdc_top dut (.*);

  always #(T_CLK / 2) clk = ~clk;

  int checks = 0, failures = 0;
  // table copy, reference histograms
  bit tbl_mv [NB], tbl_cv [NB];
  int tbl_m [NB], tbl_c [NB];
  int ref_h [NB];
  int raw_h [NB];
  // hit times and timestamp records
  realtime hit_t [$];
  bit running = 0;
  int n_seen = 0, run_id = 0;
  int fine_min = NB, fine_max = -1;
  real sx, sy, sxx, sxy; int sn;
  real rx [$], ry [$];
  // mechanism counters
  int n_wu_both = 0, n_ds = 0, n_comp = 0, n_void = 0, n_binned = 0, n_clear = 0, n_rd_defer = 0;

  // ---------------- hit generator ----------------
  initial begin
    forever begin
      wait (running);
      #(6000.0 + real'($urandom_range(1999999)) / 1000.0 + real'($urandom_range(3)) * T_CLK);
      if (running) begin
        hit_t.push_back($realtime);
        hit = 1;
        #(3100.0);
        hit = 0;
      end
    end
  end

  // ---------------- ring oscillator ----------------
  initial begin
    logic p;
    p = ro_out;
    forever begin
      #100;
      if (ro_out != p) n_ro++;
      p = ro_out;
    end
  end

  // ---------------- mechanism probes ----------------
  always @(posedge clk) begin
    if (dut.u_detect.valid) begin
      if ($countones(dut.u_sub_r.sub[1]) > 0 && $countones(dut.g_falling.u_sub_f.sub[1]) > 0) n_wu_both++;
      if ($countones(dut.u_sub_r.sub[0]) > 0) n_ds++;   // sub-TDL S[0]
    end
  end

  // ---------------- timestamp monitor ----------------
  always @(posedge clk) begin
    if (ts_valid && !rst) begin
      realtime th;
      real y, tc;
      int f;
      f = int'(ts_fine);
      n_seen++;
      checks++;
      if (hit_t.size() == 0) begin failures++; $display("timestamp without a hit"); end
      else begin
        th = hit_t.pop_front();
        // unwrap the 16-bit coarse counter against the true time
        tc = real'(ts_coarse) * T_CLK;
        while (th - tc > 32768.0 * T_CLK) tc += 65536.0 * T_CLK;
        y = th - tc;
        if (run_id == 0) begin
          sx += f; sy += y; sxx += real'(f) * f; sxy += real'(f) * y; sn++;
          rx.push_back(real'(f)); ry.push_back(y);
          if (f < fine_min) fine_min = f;
          if (f > fine_max) fine_max = f;
        end
      end
      checks++;
      if (ts_m_valid !== tbl_mv[f] || (tbl_mv[f] && int'(ts_bin) != tbl_m[f]) ||
          ts_c_valid !== tbl_cv[f] || (tbl_cv[f] && int'(ts_bin_c) != tbl_c[f])) begin
        failures++; $display("calibration lookup wrong for code %0d", f);
      end
      if (tbl_mv[f]) ref_h[tbl_m[f]]++;
      if (tbl_cv[f]) ref_h[tbl_c[f]]++;
      if (run_id == 0) raw_h[f]++;
      if (run_id == 1 && tbl_cv[f]) n_comp++;
      if (run_id == 1 && tbl_mv[f] && !tbl_cv[f]) n_void++;
      if (run_id == 2) n_binned++;
    end
  end

  // ---------------- host tasks ----------------
  task automatic load_table();
    for (int a = 0; a < NB; a++) begin
      @(negedge clk);
      cal_we = 1; cal_addr = CW'(a);
      cal_m_valid = tbl_mv[a]; cal_bcf_m = CW'(tbl_m[a]);
      cal_c_valid = tbl_cv[a]; cal_bcf_c = CW'(tbl_c[a]);
    end
    @(negedge clk); cal_we = 0;
  endtask

  task automatic clear_hist();
    @(negedge clk); hist_clear = 1;
    @(negedge clk); hist_clear = 0;
    while (hist_busy) @(negedge clk);
    n_clear++;
    foreach (ref_h[i]) ref_h[i] = 0;
  endtask

  task automatic run_hits(input int n);
    n_seen = 0;
    running = 1;
    while (n_seen < n) @(posedge clk);
    running = 0;
    repeat (20) @(posedge clk);
    checks++;
    if (hit_t.size() != 0) begin failures++; $display("%0d hits without timestamp", hit_t.size()); hit_t.delete(); end
  endtask

  // Read every bin while hits may still arrive; compare with ref_h.
  task automatic read_hist(input string what, output int nonzero);
    int bad = 0;
    nonzero = 0;
    for (int a = 0; a < NB; a++) begin
      @(negedge clk);
      rd_req = 1; rd_addr = CW'(a);
      #1;   // rd_ack now shows what the next rising edge will do
      while (!rd_ack) begin
        n_rd_defer++;
        @(negedge clk); #1;
      end
      @(posedge clk); #1;
      rd_req = 0;
      if (!rd_valid || int'(rd_data) != ref_h[a]) begin
        bad++;
        if (bad < 5) $display("%s: bin %0d read %0d exp %0d", what, a, rd_data, ref_h[a]);
      end
      if (ref_h[a] != 0) nonzero++;
    end
    checks++;
    if (bad != 0) begin failures++; $display("%s: %0d bins differ", what, bad); end
  endtask

  // Compensation / binning table from the measured bin widths (width scale
  // MERGE = 1: ideal bins one mean LSB wide; MERGE = 2: merged pairs).
  task automatic make_table(input int merge, output int n_ideal);
    real total = 0, lid, ta, tb;
    int nused = 0;
    foreach (raw_h[k]) begin total += raw_h[k]; if (raw_h[k] > 0) nused++; end
    lid = T_CLK * merge / nused;
    n_ideal = (nused + merge - 1) / merge;
    ta = 0;
    for (int k = 0; k < NB; k++) begin
      tb = ta + T_CLK * raw_h[k] / total;
      tbl_mv[k] = 0; tbl_cv[k] = 0; tbl_m[k] = 0; tbl_c[k] = 0;
      if (raw_h[k] > 0) begin
        int m = int'($floor(ta / lid));
        if (m > n_ideal - 1) m = n_ideal - 1;
        tbl_mv[k] = 1; tbl_m[k] = m;
        if (tb > (m + 1) * lid + 1e-9 && m + 1 < n_ideal) begin
          tbl_cv[k] = 1; tbl_c[k] = m + 1;
        end
      end
      ta = tb;
    end
  endtask

  function automatic real dnl_pkpk(input int first, input int last);
    real mean = 0, lo = 1e9, hi = -1e9;
    for (int i = first; i <= last; i++) mean += ref_h[i];
    mean /= (last - first + 1);
    for (int i = first; i <= last; i++) begin
      real d = ref_h[i] / mean - 1.0;
      if (d < lo) lo = d;
      if (d > hi) hi = d;
    end
    return hi - lo;
  endfunction

  initial begin
    int nz, n_ideal;
    real slope, icpt, rms, maxr;
    for (int a = 0; a < NB; a++) begin tbl_mv[a] = 1; tbl_m[a] = a; tbl_cv[a] = 0; tbl_c[a] = 0; end
    repeat (4) @(posedge clk);
    @(negedge clk) rst = 0;
    load_table();
    clear_hist();

    // ring oscillator: runs only while enabled
    ro_en = 1;
    #(100000.0);
    ro_en = 0;
    checks++;
    if (n_ro < 200 || n_ro > 260) begin failures++; $display("ring oscillator toggled %0d times in 100 ns", n_ro); end

    // run 1: raw code-density test
    run_id = 0;
    run_hits(N_HITS[0]);
    read_hist("raw", nz);
    $display("raw: %0d hits, fine codes %0d..%0d, %0d codes hit, DNL pk-pk %0.2f LSB",
             N_HITS[0], fine_min, fine_max, nz, dnl_pkpk(fine_min + 2, fine_max - 2));
    checks++;
    if (fine_max - fine_min < 1400) begin failures++; $display("fine-code span too small"); end
    slope = (sn * sxy - sx * sy) / (sn * sxx - sx * sx);
    icpt  = (sy - slope * sx) / sn;
    rms = 0; maxr = 0;
    foreach (rx[i]) begin
      automatic real r = ry[i] - (icpt + slope * rx[i]);
      rms += r * r;
      if (r > maxr) maxr = r;
      if (-r > maxr) maxr = -r;
    end
    rms = $sqrt(rms / sn);
    $display("time fit: %0.3f ps per code, residual rms %0.2f ps, max %0.2f ps", -slope, rms, maxr);
    checks++;
    if (-slope < 1.0 || -slope > 1.6) begin failures++; $display("LSB out of range"); end
    checks++;
    if (rms > 6.0 || maxr > 20.0) begin failures++; $display("timestamps not linear in hit time"); end

    // run 2: compensation
    make_table(1, n_ideal);
    load_table();
    clear_hist();
    run_id = 1;
    fork
      run_hits(N_HITS[1]);
      begin repeat (400) @(posedge clk); read_hist("compensated (during hits)", nz); end
    join
    read_hist("compensated", nz);
    $display("compensated: %0d ideal bins, %0d with counts, DNL pk-pk %0.2f", n_ideal, nz, dnl_pkpk(2, n_ideal - 3));

    // run 3: binning
    make_table(2, n_ideal);
    load_table();
    clear_hist();
    run_id = 2;
    run_hits(N_HITS[2]);
    read_hist("binned", nz);
    $display("binned: %0d merged bins, %0d with counts, DNL pk-pk %0.2f", n_ideal, nz, dnl_pkpk(2, n_ideal - 3));
    checks++;
    if (n_ideal > (fine_max - fine_min) / 2 + 2) begin failures++; $display("binning did not halve the bins"); end

    $display("mechanisms: wu_both=%0d ds=%0d comp=%0d void=%0d binned=%0d clear=%0d rd_defer=%0d",
             n_wu_both, n_ds, n_comp, n_void, n_binned, n_clear, n_rd_defer);
    checks += 7;
    if (n_wu_both == 0) begin failures++; $display("no sample with both WU edges"); end
    if (n_ds == 0)      begin failures++; $display("sum-tap sub-TDLs never used"); end
    if (n_comp == 0)    begin failures++; $display("no compensation factor applied"); end
    if (n_void == 0)    begin failures++; $display("no void compensation factor"); end
    if (n_binned == 0)  begin failures++; $display("binned run empty"); end
    if (n_clear < 3)    begin failures++; $display("histogram clear missing"); end
    if (n_rd_defer == 0) begin failures++; $display("readout never deferred by a hit"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
