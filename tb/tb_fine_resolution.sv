// tb_fine_resolution -- resolution and linearity of the fine phase shift,
// run on the full system for target fine steps of 50 ps and 100 ps.
//
// For each target step dts the host-side table is built as the method
// prescribes: drop the 100 fastest and 100 slowest of the 2^16 chain delays,
// take SEL'_0 as the fastest remaining word, and SEL'_K as the word whose
// delay is closest to t(SEL'_0) + K*dts. Then DNL(k) = 1 - (t_k - t_{k-1})/dts
// and INL(k) = sum DNL are computed and printed. The resolution dt is
// measured on the running design as dT/(m' - m), from one measurement with n
// coarse steps and one with the deliberate extra coarse step, for several
// path delays. Checked: both measurements finish without error, m' > m, the
// measured dt equals the table step crossed by the extra coarse step, the
// slack n*dT - m*dt stays within one fine step of the true slack, and |DNL|
// stays below 0.1 LSB (the table delays are whole picoseconds, so a pick can be a few ps off).
`timescale 1ps/1ps
module tb_fine_resolution;

  localparam int NS = 16;
  localparam int D0 [NS] = '{953, 975, 779, 892, 596, 975, 779, 892,
                             707, 975, 778, 892, 596, 975, 778, 892};
  localparam int D1 [NS] = '{827, 869, 948, 605, 707, 774, 948, 718,
                             826, 774, 843, 718, 707, 869, 843, 718};
  localparam int DTC = 104;

  int checks = 0, failures = 0;

  logic          rst_n = 1'b0, test = 1'b0, trg = 1'b0;
  logic          tbl_we = 1'b0, coarse_extra = 1'b0, cal_req = 1'b0;
  logic [5:0]    tbl_addr = '0, fine_last = 6'd63;
  logic [NS-1:0] tbl_sel = '0, cal_sel = '0;
  logic [3:0]    sen_dly = 4'd0;
  logic          cut_clk, cut_en, ds, qs, sclk, meas_done, cal_done;
  odm_pkg::meas_result_t result;
  logic [15:0]   cal_count_osc, cal_count_ref;
  logic [6:0]    coarse_n;
  logic [NS-1:0] sel;
  logic          scan_clr = 1'b0, q0, q3;
  int unsigned   path_ps = 9500;

  online_delay_meas dut (.*);

  tb_cut_model u_cut (
    .clk(cut_clk), .en(cut_en), .scan_clr(scan_clr), .path_ps(path_ps),
    .q0(q0), .ds(ds), .q3(q3)
  );

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  function automatic int tchain(input logic [NS-1:0] s);
    int t = 0;
    for (int i = 0; i < NS; i++) t += s[i] ? D1[i] : D0[i];
    return t;
  endfunction

  int tall [65536];
  int hist [16000];
  int tk   [64];
  int lo_ps, hi_ps, depth;

  realtime t_launch, t_capt;
  always @(posedge q0) t_launch = $realtime;
  always @(posedge sclk) if (dut.u_ctrl.sen) t_capt = $realtime;

  task automatic build_table(input int dts);
    int best, bestd, d, cnt;
    // limits that drop the 100 fastest and 100 slowest words
    cnt = 0;
    for (lo_ps = 0; lo_ps < 16000; lo_ps++) begin
      cnt += hist[lo_ps];
      if (cnt > 100) break;
    end
    cnt = 0;
    for (hi_ps = 15999; hi_ps >= 0; hi_ps--) begin
      cnt += hist[hi_ps];
      if (cnt > 100) break;
    end
    depth = (hi_ps - lo_ps) / dts + 1;
    if (depth > 64) depth = 64;
    for (int k = 0; k < depth; k++) begin
      best = 0; bestd = 1 << 30;
      for (int s = 0; s < 65536; s++) begin
        if (tall[s] < lo_ps || tall[s] > hi_ps) continue;
        d = tall[s] - (lo_ps + k * dts);
        if (d < 0) d = -d;
        if (d < bestd) begin bestd = d; best = s; end
      end
      tk[k] = tall[best];
      @(posedge cut_clk) begin
        tbl_we   <= 1'b1;
        tbl_addr <= 6'(k);
        tbl_sel  <= 16'(best);
      end
    end
    @(posedge cut_clk) tbl_we <= 1'b0;
    fine_last = 6'(depth - 1);
  endtask

  task automatic linearity(input int dts);
    real dnl, inl, dmin, dmax, imin, imax;
    dmin = 1e9; dmax = -1e9; imin = 1e9; imax = -1e9; inl = 0.0;
    for (int k = 1; k < depth; k++) begin
      dnl = 1.0 - real'(tk[k] - tk[k-1]) / real'(dts);
      inl += dnl;
      if (dnl < dmin) dmin = dnl;
      if (dnl > dmax) dmax = dnl;
      if (inl < imin) imin = inl;
      if (inl > imax) imax = inl;
    end
    $display("target step %0d ps: %0d entries from %0d ps, DNL %0.4f..%0.4f LSB, INL %0.4f..%0.4f LSB",
             dts, depth, tk[0], dmin, dmax, imin, imax);
    check(dmin > -0.1 && dmax < 0.1, "|DNL| below 0.1 LSB");
  endtask

  task automatic path_test(output logic resp);
    @(posedge cut_clk) scan_clr <= 1'b1;
    @(posedge cut_clk) scan_clr <= 1'b0;
    repeat (3) @(posedge cut_clk);
    trg <= 1'b1;
    repeat (20) @(posedge cut_clk);
    trg <= 1'b0;
    repeat (3) @(posedge cut_clk);
    resp = qs;
  endtask

  // runs the search to its end; returns n, m and the first capture offset
  task automatic measure(input bit extra, output int n, output int m, output int rel0);
    logic r;
    int   tests = 0;
    coarse_extra = extra;
    repeat (4) @(posedge cut_clk);
    path_test(r);
    rel0 = int'(t_capt - t_launch);
    while (!(tests > 0 && coarse_n == 0 && sel == dut.u_ctrl.sel_tbl[0]) && tests < 200) begin
      path_test(r);
      tests++;
    end
    repeat (2) @(posedge cut_clk);
    check(!result.err, "measurement ends without error");
    n = int'(result.n);
    m = int'(result.m);
  endtask

  task automatic resolution(input int dts, input int unsigned p);
    int n1, m1, n2, m2, rel0, slack_true, slack_meas;
    real dt;
    path_ps = p;
    measure(1'b0, n1, m1, rel0);
    measure(1'b1, n2, m2, rel0);
    slack_true = rel0 - int'(p);
    check(n2 == n1 + 1 && m2 > m1, $sformatf("n'=%0d=n+1, m'=%0d > m=%0d", n2, m2, m1));
    dt = real'(DTC) / real'(m2 - m1);
    // dT/(m'-m) is the mean table step over the entries m..m'
    check(tk[m2] - tk[m1] >= DTC - dts && tk[m2] - tk[m1] <= DTC + dts,
          "table steps m..m' span about one coarse step");
    slack_meas = n1 * DTC - (tk[m1] - tk[0]);
    check(slack_meas <= slack_true && slack_meas > slack_true - dts - 2,
          $sformatf("slack %0d ps vs true %0d ps", slack_meas, slack_true));
    $display("target %0d ps, path %0d ps: n=%0d m=%0d, m'=%0d, dt = dT/(m'-m) = %0.1f ps (%0.1f %% of dT), slack %0d ps (true %0d)",
             dts, p, n1, m1, m2, dt, 100.0 * dt / DTC, slack_meas, slack_true);
  endtask

  initial begin : main
    for (int s = 0; s < 65536; s++) begin
      tall[s] = tchain(16'(s));
      hist[tall[s]]++;
    end
    repeat (3) @(posedge cut_clk);
    rst_n <= 1'b1;
    test  <= 1'b1;
    build_table(50);
    linearity(50);
    resolution(50, 9500);
    resolution(50, 9640);
    build_table(100);
    linearity(100);
    resolution(100, 9500);
    resolution(100, 9777);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #(30000 * 10000);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
