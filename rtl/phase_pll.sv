// phase_pll -- BEHAVIOURAL MODEL (not synthesizable) of the phase-variable
// PLL clock generator that provides the coarse phase shift.
//
// clk_pll is the system clock delayed by
//     MIN_PS + (STEPS - coarse_n) * DT_PS
// so each increment of coarse_n shifts the phase of clk_pll forward by
// DT_PS (2*pi*dT/T), which moves the shadow-clock capture edge earlier by
// dT. With the defaults (dT = 104 ps, 96 steps, 9.3 ns minimum) the delay
// runs from 19.284 ns at coarse_n = 0 down to 9.3 ns at coarse_n = 96,
// mirroring a delay-tap chain used in place of a PLL phase shifter.
// coarse_n above STEPS is treated as STEPS.
//
// The model is a chain of STEPS taps of DT_PS each behind a fixed delay of
// MIN_PS (built from BASE_SEG shorter segments, because each inertial
// delay must stay below the clock half period); coarse_n selects the tap. Changing coarse_n changes the phase at
// once; the controller only does so between path delay tests.
`timescale 1ps/1ps
module phase_pll #(
  parameter int unsigned MIN_PS   = odm_pkg::COARSE_MIN_PS,
  parameter int unsigned DT_PS    = odm_pkg::DT_COARSE_PS,
  parameter int unsigned STEPS    = odm_pkg::COARSE_STEPS,
  parameter int unsigned COARSE_W = odm_pkg::COARSE_W
) (
  input  logic                ref_clk,   // system clock CLK
  input  logic [COARSE_W-1:0] coarse_n,  // forward coarse shift count n
  output logic                clk_pll    // CLK_PLL
);

  localparam int unsigned BASE_SEG = 10;
  localparam int unsigned SEG_PS   = MIN_PS / BASE_SEG;
  localparam int unsigned LAST_PS  = MIN_PS - (BASE_SEG - 1) * SEG_PS;

  logic [BASE_SEG:0] base;  // fixed part of the delay
  logic [STEPS:0]    tap;   // tap[k] = ref_clk delayed by MIN_PS + k*DT_PS

  assign base[0] = ref_clk;
  for (genvar j = 1; j <= BASE_SEG; j++) begin : g_base
    if (j < BASE_SEG) begin : g_seg
      assign #(SEG_PS) base[j] = base[j-1];
    end else begin : g_last
      assign #(LAST_PS) base[j] = base[j-1];
    end
  end

  assign tap[0] = base[BASE_SEG];
  for (genvar k = 1; k <= STEPS; k++) begin : g_tap
    assign #(DT_PS) tap[k] = tap[k-1];
  end

  always_comb begin
    if (int'(coarse_n) >= STEPS) clk_pll = tap[0];
    else                         clk_pll = tap[STEPS - int'(coarse_n)];
  end

endmodule
