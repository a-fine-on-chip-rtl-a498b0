// odm_pkg -- constants and types shared by the on-line delay measurement
// blocks.
//
// The numbers are those of the reference implementation the design follows:
// a 100 MHz system clock (10 ns period), a coarse phase step of 104 ps
// (two 52 ps delay taps), a coarse delay range of 9.3 ns to 19.3 ns,
// a 16-stage MUX chain whose per-stage wire delays (in ps, taken from a
// post-layout simulation) are listed below, and a calibration window of
// 8192 reference clocks. The counter widths, the depth of the fine-step
// table and the controller state encodings are this design's own choices.
`timescale 1ps/1ps
package odm_pkg;

  // System clock period and coarse phase step (ps)
  localparam int unsigned T_CLK_PS      = 10000;
  localparam int unsigned DT_COARSE_PS  = 104;
  // Coarse delay range: 9.3 ns .. 19.3 ns gives 96 forward steps of 104 ps
  localparam int unsigned COARSE_MIN_PS = 9300;
  localparam int unsigned COARSE_STEPS  = 96;
  localparam int unsigned COARSE_W      = 7;

  // MUX chain
  localparam int unsigned N_STAGES      = 16;
  // Wire delay of input 0 (upper) and input 1 (lower) of stage i, ps
  localparam int unsigned D0_PS [N_STAGES] = '{953, 975, 779, 892, 596, 975, 779, 892,
                                               707, 975, 778, 892, 596, 975, 778, 892};
  localparam int unsigned D1_PS [N_STAGES] = '{827, 869, 948, 605, 707, 774, 948, 718,
                                               826, 774, 843, 718, 707, 869, 843, 718};
  // Inverter + redundant MUX delay of the calibration feedback path, ps
  localparam int unsigned T_FB_PS       = 400;

  // Calibration
  localparam int unsigned CAL_CYCLES    = 8192;
  localparam int unsigned CNT_W         = 16;

  // Fine phase-step table (SEL'_0 .. SEL'_{M-1})
  localparam int unsigned FINE_DEPTH    = 64;
  localparam int unsigned FINE_AW       = 6;

  // Slack-search phase of the measurement controller (scheme steps 1-7)
  typedef enum logic [1:0] {
    PH_FIRST  = 2'd0,   // step 1: first test gives the expected value E
    PH_COARSE = 2'd1,   // steps 2-4: forward coarse shifting
    PH_FINE   = 2'd2    // steps 5-7: backward fine shifting
  } search_phase_t;

  // Path delay test sequencer
  typedef enum logic [1:0] {
    PT_IDLE   = 2'd0,   // waiting for a TRG rising edge
    PT_EN     = 2'd1,   // EN=1 for two system clock periods
    PT_WAIT   = 2'd2,   // SEN pulse issued, waiting for the capture
    PT_EVAL   = 2'd3    // response evaluated, next phase chosen
  } test_state_t;

  // Calibration sequencer
  typedef enum logic [1:0] {
    CS_IDLE   = 2'd0,
    CS_RUN    = 2'd1,   // CAL=1 for CAL_CYCLES reference clocks
    CS_TAIL   = 2'd2    // CAL=0, oscillation counter settling
  } cal_state_t;

  // Result of one slack measurement: slack = n*dT - m*dt
  typedef struct packed {
    logic                err;     // coarse or fine range exhausted
    logic                e;       // expected value E
    logic [COARSE_W-1:0] n;       // forward coarse shifts
    logic [FINE_AW-1:0]  m;       // backward fine shifts
  } meas_result_t;

endpackage
