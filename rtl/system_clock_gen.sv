// system_clock_gen -- BEHAVIOURAL MODEL (not synthesizable) of the system
// clock generator.
//
// Produces the system clock CLK with a fixed phase of 0: a square wave of
// period T_PS (default 10 ns, the 100 MHz reference oscillator of the
// reference implementation), low for the first half period, so rising
// edges fall at T/2 + k*T.
//
// Optional jitter: with JITTER_PS > 0 every edge is displaced from its ideal
// time by an independent normally distributed amount of that RMS value
// (the reference oscillator is specified at 12.8 ps RMS). The default is 0,
// an ideal clock, so that deterministic tests see exact edge times; jitter
// belongs to the oscillator chosen, not to the design. SEED sets the random
// sequence.
`timescale 1ps/1ps
module system_clock_gen #(
  parameter int unsigned T_PS      = odm_pkg::T_CLK_PS,
  parameter int unsigned JITTER_PS = 0,
  parameter int          SEED      = 1
) (
  output logic clk
);

  initial begin : gen
    longint t_ideal;
    int     seed;
    int     j;
    t_ideal = 0;
    seed    = SEED;
    clk     = 1'b0;
    forever begin
      t_ideal += longint'(T_PS / 2);
      j = (JITTER_PS == 0) ? 0 : $dist_normal(seed, 0, int'(JITTER_PS));
      #(t_ideal + longint'(j) - longint'($time));
      clk = ~clk;
    end
  end

endmodule
