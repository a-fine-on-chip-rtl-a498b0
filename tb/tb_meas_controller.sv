// tb_meas_controller -- checks the measurement controller on its own.
//
// The shadow clock path is replaced by a response model: the shadow
// flip-flop, clocked by clk2, captures on a clk2 edge with sen=1 the value
// "capture time > path delay", where the capture time relative to the
// launch is S0 - n*104 ps + 13 ps * SEL (a made-up fine step of 13 ps with
// the table holding SEL'_k = k). Checked: EN is high for exactly two clock
// edges per test, three cycles after the trg edge is applied; SEN is high
// for exactly one clk2 edge per test; n and m of each result equal the
// values worked out here; the extra coarse step; the coarse- and
// fine-range errors; normal mode (en=1, sen=0, trg ignored); calibration
// (cal high for exactly CAL_LEN cycles, sel = cal_sel meanwhile, counts
// latched).
`timescale 1ps/1ps
module tb_meas_controller;

  localparam int CAL_LEN = 64;
  localparam int S0      = 3000;

  int checks = 0, failures = 0;
  int cnt_coarse = 0, cnt_fine = 0;

  logic        clk = 1'b0, clk2, rst_n = 1'b0, test = 1'b0, trg = 1'b0;
  logic        tbl_we = 1'b0, coarse_extra = 1'b0, cal_req = 1'b0, qs = 1'b0;
  logic [5:0]  tbl_addr = '0, fine_last = 6'd63;
  logic [15:0] tbl_sel = '0, cal_sel = '0, count_osc = '0, count_ref = '0;
  logic [3:0]  sen_dly = 4'd2;
  logic        en, sen, cal, meas_done, cal_done;
  logic [15:0] sel, cal_count_osc, cal_count_ref;
  logic [6:0]  coarse_n;
  odm_pkg::meas_result_t result;
  int          path_ps = 1000;

  meas_controller #(.CAL_LEN(CAL_LEN)) u_dut (.*);

  always #5000 clk = ~clk;
  assign #3000 clk2 = clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  // response model (shadow flip-flop)
  always @(posedge clk2) begin
    if (sen) qs <= (S0 - int'(coarse_n) * 104 + 13 * int'(sel)) > path_ps;
  end

  // edge counters
  int en_edges, sen_edges, en_first, edge_no;
  always @(posedge clk) begin
    edge_no++;
    if (test && en) begin
      if (en_edges == 0) en_first = edge_no;
      en_edges++;
    end
  end
  always @(posedge clk2) if (sen) sen_edges++;

  // one path delay test
  task automatic one_test();
    int trg_edge;
    en_edges = 0; sen_edges = 0;
    @(posedge clk);
    #1;
    trg_edge = edge_no;
    trg <= 1'b1;
    repeat (25) @(posedge clk);
    trg <= 1'b0;
    repeat (3) @(posedge clk);
    check(en_edges == 2, $sformatf("en high for %0d edges", en_edges));
    check(en_first - trg_edge == 4, $sformatf("en first sampled %0d edges after trg",
                                              en_first - trg_edge));
    check(sen_edges == 1, $sformatf("sen high for %0d clk2 edges", sen_edges));
  endtask

  task automatic measure(input int p, input bit extra, input bit exp_err);
    int n_exp, m_exp, tests, n_final;
    path_ps = p;
    coarse_extra = extra;
    n_exp = 1;
    while (S0 - n_exp * 104 > p) n_exp++;
    n_final = n_exp + (extra ? 1 : 0);
    m_exp = 1;
    while (S0 - n_final * 104 + 13 * m_exp <= p) m_exp++;
    if (m_exp > int'(fine_last)) m_exp = int'(fine_last);
    tests = 0;
    while (1) begin
      one_test();
      tests++;
      if (meas_done || tests > 200) break;
      if (coarse_n != 0 && sel == 0) cnt_coarse++;
      if (sel != 0) cnt_fine++;
      repeat (2) @(posedge clk);
      if (result.n != 0 && tests > 1 && coarse_n == 0 && sel == 0) break;
    end
    check(result.err == exp_err, $sformatf("path %0d: err=%0b", p, result.err));
    if (!exp_err) begin
      check(int'(result.n) == n_final && int'(result.m) == m_exp && result.e == 1'b1,
            $sformatf("path %0d: n=%0d m=%0d expected %0d %0d", p, result.n, result.m,
                      n_final, m_exp));
      check(tests == n_exp + m_exp + 1, $sformatf("tests %0d", tests));
    end
    check(coarse_n == 0 && sel == 16'd0, "search settings cleared after a result");
  endtask

  initial begin : main
    repeat (2) @(posedge clk);
    rst_n <= 1'b1;
    for (int k = 0; k < 64; k++) begin
      @(posedge clk) begin
        tbl_we <= 1'b1; tbl_addr <= 6'(k); tbl_sel <= 16'(k);
      end
    end
    @(posedge clk) tbl_we <= 1'b0;

    // normal mode
    en_edges = 0; sen_edges = 0;
    @(posedge clk) trg <= 1'b1;
    repeat (20) @(posedge clk);
    trg <= 1'b0;
    check(en == 1'b1 && sen_edges == 0, "normal mode: en=1, sen=0");
    check(coarse_n == 0, "normal mode: trg ignored");

    // calibration
    begin
      int cal_cycles = 0;
      count_osc = 16'd3030; count_ref = 16'd8192;
      @(posedge clk) begin cal_req <= 1'b1; cal_sel <= 16'hBEEF; end
      @(posedge clk) cal_req <= 1'b0;
      while (!cal_done) begin
        @(posedge clk);
        if (cal) begin
          cal_cycles++;
          if (sel != 16'hBEEF) begin failures++; $display("FAIL: sel during cal"); end
        end
      end
      check(cal_cycles == CAL_LEN, $sformatf("cal high %0d cycles", cal_cycles));
      @(posedge clk);
      check(cal_count_osc == 16'd3030 && cal_count_ref == 16'd8192, "counts latched");
    end

    test <= 1'b1;
    repeat (4) @(posedge clk);
    measure(1000, 1'b0, 1'b0);
    measure(1000, 1'b1, 1'b0);
    measure(2077, 1'b0, 1'b0);
    measure(2905, 1'b0, 1'b0);
    measure(-9000, 1'b0, 1'b1);       // slack beyond the coarse range
    fine_last = 6'd3;
    measure(1040, 1'b1, 1'b1);        // needs more fine steps than the table has
    fine_last = 6'd63;
    measure(1500, 1'b0, 1'b0);

    test <= 1'b0;
    repeat (3) @(posedge clk);
    check(en == 1'b1 && sen == 1'b0, "back in normal mode");
    check(cnt_coarse > 0 && cnt_fine > 0, "coarse and fine steps seen");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #200_000_000;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
