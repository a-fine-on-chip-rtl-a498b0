// tb_online_delay_meas -- end-to-end test of the slack measurement system at
// its default sizes (16-stage MUX chain, 104 ps coarse step, 8192-cycle
// calibration, 64-entry fine table).
//
// Sequence:
//   1. normal mode (test=0): en must stay 1 and sen 0;
//   2. calibration of several SEL words: COUNT_REF must be 8192 and the
//      chain delay derived from the counts, (COUNT_REF*T/COUNT_OSC)/2 - t_fb,
//      must match the sum of the stage wire delays to within 60 ps;
//   3. the host's table: SEL'_0..SEL'_63 chosen from the 2^16 chain delays,
//      worked out here from an independent copy of the wire delay table,
//      to sweep the delay up in steps of DELTA_PS;
//   4. slack measurements of paths of several delays, normal and with the
//      deliberate extra coarse step, plus one whose slack exceeds the coarse
//      range (error). A monitor records the launch time (Q0 rising) and the
//      shadow clock edge inside each sen window; every captured response must
//      match the path delay, every capture must move by exactly -dT per
//      coarse step and by the table delay per fine step, and n and m must
//      equal the values predicted from the first capture time.
// Each mechanism (normal mode, calibration, coarse shift, fine shift, extra
// coarse step, range error) is counted and must occur.
`timescale 1ps/1ps
module tb_online_delay_meas;

  localparam int unsigned NS       = 16;
  localparam int unsigned T_PS     = 10000;
  localparam int unsigned DTC_PS   = 104;
  localparam int unsigned TFB_PS   = 400;
  localparam int unsigned DELTA_PS = 10;
  localparam int unsigned DEPTH    = 64;
  localparam int          D0 [NS]  = '{953, 975, 779, 892, 596, 975, 779, 892,
                                        707, 975, 778, 892, 596, 975, 778, 892};
  localparam int          D1 [NS]  = '{827, 869, 948, 605, 707, 774, 948, 718,
                                        826, 774, 843, 718, 707, 869, 843, 718};

  int checks = 0, failures = 0;
  int cnt_normal = 0, cnt_cal = 0, cnt_coarse = 0, cnt_fine = 0,
      cnt_extra = 0, cnt_err = 0;

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

  // ---------------------------------------------------------------------
  // Chain delays, from the wire delay table
  function automatic int tchain(input logic [NS-1:0] s);
    int t = 0;
    for (int i = 0; i < NS; i++) t += s[i] ? D1[i] : D0[i];
    return t;
  endfunction

  int            tall [65536];
  logic [NS-1:0] tbl  [DEPTH];

  // ---------------------------------------------------------------------
  // Monitor: launch time and capture edges
  realtime t_launch, t_capt;
  int      capt_edges;
  logic    capt_val;

  always @(posedge q0) t_launch = $realtime;
  always @(posedge sclk) begin
    if (dut.u_ctrl.sen) begin
      t_capt   = $realtime;
      capt_val = ds;
      capt_edges++;
    end
  end

  // Normal-mode monitor
  always @(posedge cut_clk) begin
    if (rst_n && !test) begin
      if (!cut_en || dut.u_ctrl.sen) begin
        failures++;
        $display("FAIL: normal mode en=%0b sen=%0b", cut_en, dut.u_ctrl.sen);
      end
    end
  end

  // ---------------------------------------------------------------------
  // One path delay test; returns the capture time relative to the launch
  task automatic path_test(output int rel_ps, output logic resp);
    @(posedge cut_clk) scan_clr <= 1'b1;
    @(posedge cut_clk) scan_clr <= 1'b0;
    repeat (3) @(posedge cut_clk);
    capt_edges = 0;
    trg <= 1'b1;
    repeat (20) @(posedge cut_clk);
    trg <= 1'b0;
    repeat (3) @(posedge cut_clk);
    rel_ps = int'(t_capt - t_launch);
    resp   = capt_val;
    check(capt_edges == 1, "exactly one shadow clock edge inside the sen window");
    check(qs == capt_val, "SDFF holds the value of ds at the capture edge");
    check(resp == (t_launch + realtime'(path_ps) < t_capt),
          "response matches the path delay");
  endtask

  // Full measurement; predicted n/m from the first capture time
  task automatic measure(input int unsigned p, input bit extra, input bit expect_err);
    int   rel0, rel, slack, n_exp, m_exp, n, m, tests;
    logic r, e;
    path_ps      = p;
    coarse_extra = extra;
    repeat (4) @(posedge cut_clk);
    path_test(rel0, e);
    check(e == 1'b1, "first response is 1 (positive slack)");
    slack = rel0 - int'(p);
    $display("path %0d ps: first capture %0d ps after launch", p, rel0);
    n_exp = slack / int'(DTC_PS) + 1;
    n = 0; m = 0; tests = 1;
    // coarse phase
    while (1) begin
      n++;
      path_test(rel, r);
      tests++;
      if (!expect_err)
        check(rel == rel0 - n * int'(DTC_PS), "coarse step moves capture by -dT");
      cnt_coarse++;
      if (r != e || n >= 96 || meas_done) break;
    end
    if (!expect_err) begin
      check(n == n_exp, $sformatf("n=%0d expected %0d", n, n_exp));
      if (extra) begin
        n++;
        cnt_extra++;
      end
      // predicted m
      m_exp = 1;
      while (rel0 - n * int'(DTC_PS) + tchain(tbl[m_exp]) - tchain(tbl[0]) <= int'(p))
        m_exp++;
      // fine phase
      while (1) begin
        m++;
        path_test(rel, r);
        tests++;
        cnt_fine++;
        check(rel == rel0 - n * int'(DTC_PS) + tchain(tbl[m]) - tchain(tbl[0]),
              "fine step moves capture by the table delay");
        if (r == e) break;
      end
      check(m == m_exp, $sformatf("m=%0d expected %0d", m, m_exp));
    end
    repeat (2) @(posedge cut_clk);
    check(result.err == expect_err, "error flag");
    if (!expect_err) begin
      check(int'(result.n) == n && int'(result.m) == m && result.e == e,
            $sformatf("result n=%0d m=%0d e=%0b, expected %0d %0d %0b",
                      result.n, result.m, result.e, n, m, e));
      check(tests == n + m + 1 - (extra ? 1 : 0), "number of tests is n+m+1");
      $display("path %0d ps: n=%0d m=%0d slack=%0d ps (capture %0d ps after launch)",
               p, n, m, n * int'(DTC_PS) - (tchain(tbl[m]) - tchain(tbl[0])), rel0);
    end else begin
      cnt_err++;
    end
  endtask

  // ---------------------------------------------------------------------
  task automatic calibrate(input logic [NS-1:0] s);
    real t_osc, t_meas;
    @(posedge cut_clk) begin
      cal_sel <= s;
      cal_req <= 1'b1;
    end
    @(posedge cut_clk) cal_req <= 1'b0;
    @(posedge cut_clk iff cal_done);
    @(posedge cut_clk);
    t_osc  = real'(cal_count_ref) * T_PS / real'(cal_count_osc);
    t_meas = t_osc / 2.0 - TFB_PS;
    check(cal_count_ref == 16'd8192, "calibration window is 8192 clocks");
    check(t_meas > tchain(s) - 60.0 && t_meas < tchain(s) + 60.0,
          $sformatf("calibrated delay %0.1f ps vs %0d ps", t_meas, tchain(s)));
    $display("calibration SEL=%h: COUNT_OSC=%0d COUNT_REF=%0d -> %0.1f ps (model %0d ps)",
             s, cal_count_osc, cal_count_ref, t_meas, tchain(s));
    cnt_cal++;
  endtask

  // ---------------------------------------------------------------------
  initial begin : main
    int t0, best, bestd, d;
    repeat (3) @(posedge cut_clk);
    rst_n <= 1'b1;

    // 1. normal mode
    repeat (20) @(posedge cut_clk);
    check(cut_en == 1'b1, "normal mode: en = 1");
    cnt_normal++;

    // 2. calibration
    calibrate(16'h0000);
    calibrate(16'hFFFF);
    calibrate(16'hA5C3);

    // 3. fine table (host computation)
    for (int s = 0; s < 65536; s++) tall[s] = tchain(16'(s));
    t0 = 11885 + 200;
    for (int k = 0; k < int'(DEPTH); k++) begin
      best = 0; bestd = 1 << 30;
      for (int s = 0; s < 65536; s++) begin
        d = tall[s] - (t0 + k * int'(DELTA_PS));
        if (d < 0) d = -d;
        if (d < bestd) begin bestd = d; best = s; end
      end
      tbl[k] = 16'(best);
      @(posedge cut_clk) begin
        tbl_we   <= 1'b1;
        tbl_addr <= 6'(k);
        tbl_sel  <= 16'(best);
      end
    end
    @(posedge cut_clk) tbl_we <= 1'b0;

    // 4. measurements
    test <= 1'b1;
    repeat (5) @(posedge cut_clk);
    measure(9500, 1'b0, 1'b0);
    measure(9500, 1'b1, 1'b0);
    measure(9731, 1'b0, 1'b0);
    measure(10017, 1'b0, 1'b0);
    measure(100, 1'b0, 1'b1);

    // back to normal mode
    test <= 1'b0;
    repeat (10) @(posedge cut_clk);
    check(cut_en == 1'b1, "normal mode after measurement: en = 1");
    cnt_normal++;

    $display("mechanisms: normal=%0d calibration=%0d coarse=%0d fine=%0d extra=%0d range_error=%0d",
             cnt_normal, cnt_cal, cnt_coarse, cnt_fine, cnt_extra, cnt_err);
    check(cnt_normal > 0, "normal mode exercised");
    check(cnt_cal    > 0, "calibration exercised");
    check(cnt_coarse > 0, "coarse shift exercised");
    check(cnt_fine   > 0, "fine shift exercised");
    check(cnt_extra  > 0, "extra coarse step exercised");
    check(cnt_err    > 0, "range error exercised");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Watchdog: 40000 system clock periods
  initial begin
    #(40000 * T_PS);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
