// online_delay_meas -- on-line path slack measurement with a coarse PLL
// phase shift and a fine MUX-chain phase shift (top level).
//
// A shadow flip-flop samples the end point of a critical path of the
// circuit under measurement on a separate shadow clock SCLK. SCLK is the
// system clock CLK passed through a phase-variable PLL (coarse steps of dT
// forward, i.e. earlier capture) and then through a MUX chain (fine steps
// of about dt, later capture). The controller repeats launch-on-capture
// path delay tests: it first moves the capture edge earlier in coarse steps
// until the response flips, then later in fine steps until it flips back.
// The slack of the path against the initial capture time is then
// n*dT - m*dt. The MUX chain can be closed into a ring oscillator and
// measured against CLK to calibrate its delays.
//
// Blocks: system_clock_gen (CLK), phase_pll (CLK_PLL), mux_chain_unit
// (SCLK, COUNT_OSC, COUNT_REF), meas_controller, shadow_ff (SDFF). The
// clock sources and the MUX chain delays are behavioural models, so this
// top is for simulation; the controller, counters and SDFF are
// synthesizable.
//
// Interface: the circuit under measurement is outside. It receives cut_clk
// (CLK) and cut_en (EN) for its flip-flops and returns ds, the end point of
// the path under measurement; qs is the captured response. The host drives
// test, trg, the table port and the calibration request synchronously to
// cut_clk, and reads result/meas_done and the calibration counts. sclk is
// brought out for observation.
//
// The combinational loop that lint reports inside u_mux_chain is the
// calibration ring oscillator, which exists by design (see mux_chain_delay).
`timescale 1ps/1ps
module online_delay_meas
  import odm_pkg::*;
#(
  parameter int unsigned N  = N_STAGES,
  parameter int unsigned W  = CNT_W,
  parameter int unsigned AW = FINE_AW,
  parameter int unsigned JITTER_PS = 0   // RMS jitter of the clock model
) (
  input  logic          rst_n,
  // mode, trigger and host configuration
  input  logic          test,
  input  logic          trg,
  input  logic          tbl_we,
  input  logic [AW-1:0] tbl_addr,
  input  logic [N-1:0]  tbl_sel,
  input  logic [AW-1:0] fine_last,
  input  logic [3:0]    sen_dly,
  input  logic          coarse_extra,
  input  logic          cal_req,
  input  logic [N-1:0]  cal_sel,
  // circuit under measurement
  output logic          cut_clk,
  output logic          cut_en,
  input  logic          ds,
  output logic          qs,
  output logic          sclk,
  // results
  output meas_result_t  result,
  output logic          meas_done,
  output logic          cal_done,
  output logic [W-1:0]  cal_count_osc,
  output logic [W-1:0]  cal_count_ref,
  output logic [COARSE_W-1:0] coarse_n,
  output logic [N-1:0]  sel
);

  logic         clk, clk_pll, cal, sen;
  logic [W-1:0] count_osc, count_ref;

  system_clock_gen #(.JITTER_PS(JITTER_PS)) u_sysclk (.clk(clk));

  phase_pll u_pll (
    .ref_clk  (clk),
    .coarse_n (coarse_n),
    .clk_pll  (clk_pll)
  );

  mux_chain_unit #(.N(N), .W(W)) u_mux_chain (
    .in_clk    (clk_pll),
    .clk       (clk),
    .rst_n     (rst_n),
    .cal       (cal),
    .sel       (sel),
    .out       (sclk),
    .count_osc (count_osc),
    .count_ref (count_ref)
  );

  meas_controller #(.N(N), .W(W), .AW(AW)) u_ctrl (
    .clk           (clk),
    .clk2          (clk_pll),
    .rst_n         (rst_n),
    .test          (test),
    .trg           (trg),
    .tbl_we        (tbl_we),
    .tbl_addr      (tbl_addr),
    .tbl_sel       (tbl_sel),
    .fine_last     (fine_last),
    .sen_dly       (sen_dly),
    .coarse_extra  (coarse_extra),
    .cal_req       (cal_req),
    .cal_sel       (cal_sel),
    .qs            (qs),
    .count_osc     (count_osc),
    .count_ref     (count_ref),
    .en            (cut_en),
    .sen           (sen),
    .cal           (cal),
    .sel           (sel),
    .coarse_n      (coarse_n),
    .result        (result),
    .meas_done     (meas_done),
    .cal_done      (cal_done),
    .cal_count_osc (cal_count_osc),
    .cal_count_ref (cal_count_ref)
  );

  shadow_ff u_sdff (
    .sclk (sclk),
    .sen  (sen),
    .ds   (ds),
    .qs   (qs)
  );

  assign cut_clk = clk;

endmodule
