// tb_cut_model -- behavioural model of the circuit under measurement, for
// testbenches only.
//
// Only the path under measurement is modelled: launch flip-flop FF0 with
// enable, a delay of path_ps from Q0 to the end point ds, and
// capture flip-flop FF3 on that end point. The launch-on-capture pattern is
// a rising transition at Q0: D0 is tied to 1, and scan_clr (standing in for
// loading the pattern through the scan chain) clears Q0 before each test.
`timescale 1ps/1ps
module tb_cut_model (
  input  logic        clk,
  input  logic        en,
  input  logic        scan_clr,
  input  int unsigned path_ps,
  output logic        q0,
  output logic        ds,
  output logic        q3
);

  initial begin
    q0 = 1'b0;
    q3 = 1'b0;
  end

  always_ff @(posedge clk) begin
    if (scan_clr) q0 <= 1'b0;
    else if (en)  q0 <= 1'b1;
  end

  assign #(path_ps) ds = q0;

  always_ff @(posedge clk) begin
    if (en) q3 <= ds;
  end

endmodule
