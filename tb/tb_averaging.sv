// tb_averaging -- precision of repeated slack measurements under clock
// jitter, and the gain from averaging.
//
// The system clock model is given 13 ps RMS edge jitter (the reference
// oscillator is specified at 12.8 ps). The fine table is built for 10 ps
// target steps. One path is measured 64 times; each slack is
// n*dT - (t(SEL'_m) - t(SEL'_0)), using the table's own delays. The mean of
// all 64 is taken as the true slack. For averaging counts k = 1, 2, 4 and 8
// the 64 results are cut into groups of k, and the RMS deviation (sigma) of
// the group means from the true slack is printed. Checked: every measurement
// ends without error, jitter does spread the results (sigma(1) > 0), every
// result lies within 100 ps of the jitter-free slack, and averaging 8
// results gives a smaller sigma than a single result.
`timescale 1ps/1ps
module tb_averaging;

  localparam int NS   = 16;
  localparam int D0 [NS] = '{953, 975, 779, 892, 596, 975, 779, 892,
                             707, 975, 778, 892, 596, 975, 778, 892};
  localparam int D1 [NS] = '{827, 869, 948, 605, 707, 774, 948, 718,
                             826, 774, 843, 718, 707, 869, 843, 718};
  localparam int DTC  = 104;
  localparam int RUNS = 64;

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
  int unsigned   path_ps = 9560;

  online_delay_meas #(.JITTER_PS(13)) dut (.*);

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
  int tk   [64];
  real slack [RUNS];

  task automatic path_test();
    @(posedge cut_clk) scan_clr <= 1'b1;
    @(posedge cut_clk) scan_clr <= 1'b0;
    repeat (3) @(posedge cut_clk);
    trg <= 1'b1;
    repeat (20) @(posedge cut_clk);
    trg <= 1'b0;
    repeat (3) @(posedge cut_clk);
  endtask

  initial begin : main
    int  t0, best, bestd, d, tests;
    real truth, s, s2, mean;
    for (int x = 0; x < 65536; x++) tall[x] = tchain(16'(x));
    repeat (3) @(posedge cut_clk);
    rst_n <= 1'b1;
    // fine table, 10 ps target steps
    t0 = 11885 + 200;
    for (int k = 0; k < 64; k++) begin
      best = 0; bestd = 1 << 30;
      for (int x = 0; x < 65536; x++) begin
        d = tall[x] - (t0 + k * 10);
        if (d < 0) d = -d;
        if (d < bestd) begin bestd = d; best = x; end
      end
      tk[k] = tall[best];
      @(posedge cut_clk) begin
        tbl_we <= 1'b1; tbl_addr <= 6'(k); tbl_sel <= 16'(best);
      end
    end
    @(posedge cut_clk) tbl_we <= 1'b0;
    test <= 1'b1;
    repeat (4) @(posedge cut_clk);

    // the jitter-free slack: capture 11285 + (t(SEL'_0) - 12000) ps after
    // launch with sen_dly = 0 and the default delays
    truth = real'(9284 + tk[0] - 10000) - real'(path_ps);
    for (int r = 0; r < RUNS; r++) begin
      tests = 0;
      path_test();
      while (!(coarse_n == 0 && sel == dut.u_ctrl.sel_tbl[0]) && tests < 200) begin
        path_test();
        tests++;
      end
      repeat (2) @(posedge cut_clk);
      check(!result.err, "measurement ends without error");
      slack[r] = real'(int'(result.n) * DTC - (tk[result.m] - tk[0]));
      check(slack[r] > truth - 100.0 && slack[r] < truth + 100.0,
            $sformatf("run %0d: slack %0.0f ps, jitter-free %0.0f ps", r, slack[r], truth));
    end

    mean = 0.0;
    foreach (slack[r]) mean += slack[r];
    mean /= RUNS;
    $display("jitter-free slack %0.1f ps, mean of %0d measurements %0.1f ps", truth, RUNS, mean);
    begin
      real sig [4];
      for (int e = 0; e < 4; e++) begin
        int k;
        k  = 1 << e;
        s2 = 0.0;
        for (int g = 0; g < RUNS / k; g++) begin
          s = 0.0;
          for (int i = 0; i < k; i++) s += slack[g * k + i];
          s2 += (s / k - mean) * (s / k - mean);
        end
        sig[e] = $sqrt(s2 / (RUNS / k));
        $display("averaging %0d: sigma %0.2f ps over %0d groups", k, sig[e], RUNS / k);
      end
      check(sig[0] > 0.0, "jitter spreads single results");
      check(sig[3] < sig[0], "averaging 8 results reduces sigma");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #(400000 * 10000);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
