// mux_chain_unit -- the MUX chain block as it is connected in the system:
// the delay chain with its redundant MUX and feedback, plus the oscillation
// counter and the reference counter used to calibrate it.
//
// cal=0: out is in_clk delayed by the chain delay selected by sel; this is
//        the shadow clock SCLK.
// cal=1: the chain oscillates. osc_counter counts its periods (COUNT_OSC)
//        and ref_counter counts system clock cycles (COUNT_REF) for as long
//        as cal is high. Keep cal high for a whole number of reference
//        cycles (the controller uses 8192), drop it, wait a few cycles,
//        then read both counts. The ring period is
//        T_OSC = COUNT_REF / COUNT_OSC * T_CLK, and, as the oscillator
//        needs two trips round the loop per period,
//        t_chain(sel) + t_fb = T_OSC / 2.
//
// Starting the ring cleanly: while the chain carries the PLL clock it holds
// one or more clock edges in flight (its delay exceeds half a clock period).
// Closing the loop on them would leave several edges circulating, and the
// ring would run at a multiple of its fundamental frequency. So a rising
// cal first holds the chain input low for DRAIN reference cycles, long
// enough for the chain to empty, and only then closes the loop (ring_cal).
// ring_cal is cal delayed by DRAIN cycles, so the counters still see a
// window exactly as long as cal; the input is released when ring_cal falls.
// This drain step is this design's own addition.
`timescale 1ps/1ps
module mux_chain_unit #(
  parameter int unsigned N = odm_pkg::N_STAGES,
  parameter int unsigned W = odm_pkg::CNT_W,
  parameter int unsigned DRAIN = 3
) (
  input  logic         in_clk,     // IN: PLL clock
  input  logic         clk,        // CLK: reference clock for COUNT_REF
  input  logic         rst_n,
  input  logic         cal,        // CAL, synchronous to clk
  input  logic [N-1:0] sel,        // SEL
  output logic         out,        // OUT: shadow clock SCLK
  output logic [W-1:0] count_osc,  // COUNT_OSC
  output logic [W-1:0] count_ref   // COUNT_REF
);

  logic [DRAIN-1:0] cal_dly;
  logic             ring_cal, hold_in, in_g;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) cal_dly <= '0;
    else        cal_dly <= {cal_dly[DRAIN-2:0], cal};
  end

  assign ring_cal = cal_dly[DRAIN-1];
  assign hold_in  = cal | ring_cal;
  assign in_g     = in_clk & ~hold_in;

  mux_chain_delay #(.N(N)) u_chain (
    .in_clk (in_g),
    .cal    (ring_cal),
    .sel    (sel),
    .out    (out)
  );

  osc_counter #(.W(W)) u_osc_cnt (
    .osc       (out),
    .rst_n     (rst_n),
    .cal       (ring_cal),
    .count_osc (count_osc)
  );

  ref_counter #(.W(W)) u_ref_cnt (
    .clk       (clk),
    .rst_n     (rst_n),
    .cal       (ring_cal),
    .count_ref (count_ref)
  );

endmodule
