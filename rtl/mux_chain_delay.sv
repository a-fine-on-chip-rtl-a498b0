// mux_chain_delay -- BEHAVIOURAL MODEL (not synthesizable) of the MUX chain
// used as a fine phase shifter.
//
// The chain is a redundant 2-to-1 MUX followed by N serially connected
// 2-to-1 MUX stages. Both inputs of stage i are fed from the same node, but
// through wires of different delay: d_i0 to input 0 and d_i1 to input 1.
// Select bit sel[i] (S_i) picks which wire the clock takes, so the delay
// from in_clk to out is the sum over the stages of d_{i,S_i}; with N stages
// there are 2^N selectable delays. The wire delays default to the
// post-layout values of the 16-stage reference chain (odm_pkg::D0_PS/D1_PS);
// their sums span 11.885 ns .. 14.243 ns.
//
// cal=0: the redundant MUX passes the external clock in_clk to the chain.
// cal=1: the redundant MUX feeds back the inverted output, forming a ring
//        oscillator whose half period is the chain delay plus the
//        feedback delay T_FB (inverter and redundant MUX).
//
// Timing: continuous-assignment (inertial) delays in ps (timescale
// 1ps/1ps), all well below the 5 ns clock half period; the MUX cells
// themselves are modelled with zero delay, so that the wire delays alone
// reproduce the chain's minimum and maximum delay. The feedback delay is
// this model's own assumption; the path in_clk -> IN0 has zero delay.
//
// Lint reports circular combinational logic through node[] and fb: that
// loop is the ring oscillator itself, closed on purpose when cal=1, and the
// delay on fb keeps it from settling in zero time.
`timescale 1ps/1ps
module mux_chain_delay #(
  parameter int unsigned N               = odm_pkg::N_STAGES,
  parameter int unsigned D0_PS [N]       = odm_pkg::D0_PS,
  parameter int unsigned D1_PS [N]       = odm_pkg::D1_PS,
  parameter int unsigned T_FB_PS         = odm_pkg::T_FB_PS
) (
  input  logic         in_clk,   // IN: clock from the PLL
  input  logic         cal,      // CAL: 1 = ring oscillator for calibration
  input  logic [N-1:0] sel,      // SEL: sel[i] is S_i of stage i
  output logic         out       // OUT: shadow clock SCLK
);

  logic [N:0] node;   // node[0] is IN0, node[N] is OUT
  logic       fb;     // inverted OUT after the feedback delay

  assign #(T_FB_PS) fb = ~node[N];

  // Redundant MUX
  assign node[0] = cal ? fb : in_clk;

  // Internal MUX chain
  for (genvar i = 0; i < N; i++) begin : g_stage
    logic w0, w1;
    assign #(D0_PS[i]) w0 = node[i];
    assign #(D1_PS[i]) w1 = node[i];
    assign node[i+1] = sel[i] ? w1 : w0;
  end

  assign out = node[N];

endmodule
