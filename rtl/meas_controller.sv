// meas_controller -- controller of the on-line slack measurement.
//
// It has three jobs.
//
// 1. Path delay test (launch-on-capture). With test=1, each rising edge of
//    trg starts one test: en goes high for exactly two system clock
//    periods, so the circuit under measurement launches a transition at the
//    start point on the first clock edge and captures on the second. Then a
//    one-period pulse sen_clk is issued sen_dly+1 periods after en rose; it
//    is retimed once by the PLL clock clk2 and leaves as sen, so it brackets
//    exactly one rising edge of the shadow clock, the edge on which the
//    shadow flip-flop captures the response. EVAL_WAIT periods later the
//    response qs, brought in through a two-flop synchronizer, is evaluated.
//    With test=0 the circuit works normally: en=1 and sen=0.
//
// 2. Slack search, one step per test (scheme steps 1-7):
//      first test             expected value E := response, n := 1
//      coarse phase           response == E: n := n+1 (capture dT earlier)
//                             response != E: m := 1, fine phase
//                             (with coarse_extra=1 also n := n+1, giving the
//                             second measurement needed to find dt from
//                             dt = dT / (m' - m))
//      fine phase             response != E: m := m+1 (capture later)
//                             response == E: done, slack = n*dT - m*dt
//    coarse_n (= n) steers the PLL phase; sel = table[m] steers the MUX
//    chain, where the table holds SEL'_0..SEL'_M, the select words that
//    sweep the chain delay up in steps of about dt. The table is written
//    through tbl_we/tbl_addr/tbl_sel; fine_last is the last valid index.
//    Running out of coarse steps (COARSE_MAX) or fine steps (fine_last)
//    ends the measurement with result.err=1. When a measurement ends, its
//    result is held in result, meas_done pulses, and n and m return to 0
//    so that the next trg starts a new measurement. test=0 also clears the
//    search.
//
// 3. Calibration. A cal_req pulse (accepted between tests) sets the MUX
//    chain to cal_sel and holds cal=1 for exactly CAL_CYCLES system clocks,
//    which makes the chain a ring oscillator and lets its two counters run.
//    CAL_TAIL cycles after cal falls both counts are stable; they are
//    latched into cal_count_osc/cal_count_ref and cal_done pulses. Working
//    out the chain delay from the counts (and from it the table) is left to
//    the host.
//
// What follows the document: the two-period en pulse, the one-period sen
// pulse, en=1/sen=0 in normal mode, the search order and result, the
// deliberate extra coarse step, the 8192-cycle calibration. This design's
// own choices: the host interface (table port, cal_req, sen_dly,
// coarse_extra, fine_last), the synchronizers, the wait counts and the
// error flag. Interface timing: all inputs except qs are synchronous to
// clk; trg is synchronized anyway. sen is the only output clocked by clk2.
`timescale 1ps/1ps
module meas_controller
  import odm_pkg::*;
#(
  parameter int unsigned N          = N_STAGES,
  parameter int unsigned W          = CNT_W,
  parameter int unsigned CW         = COARSE_W,
  parameter int unsigned COARSE_MAX = COARSE_STEPS,
  parameter int unsigned AW         = FINE_AW,
  parameter int unsigned DEPTH      = FINE_DEPTH,
  parameter int unsigned CAL_LEN    = CAL_CYCLES,
  parameter int unsigned CAL_TAIL   = 16,
  parameter int unsigned EVAL_WAIT  = 8
) (
  input  logic          clk,           // CLK, system clock
  input  logic          clk2,          // CLK2 = CLK_PLL
  input  logic          rst_n,         // asynchronous reset, active low
  // mode and trigger
  input  logic          test,          // TEST: 1 = measurement mode
  input  logic          trg,           // TRG: rising edge starts a test
  // host configuration
  input  logic          tbl_we,        // write SEL' table entry
  input  logic [AW-1:0] tbl_addr,
  input  logic [N-1:0]  tbl_sel,
  input  logic [AW-1:0] fine_last,     // index of the last valid entry
  input  logic [3:0]    sen_dly,       // sen_clk position after en, periods-1
  input  logic          coarse_extra,  // 1: one deliberate extra coarse step
  input  logic          cal_req,       // start a calibration
  input  logic [N-1:0]  cal_sel,       // SEL to calibrate
  // from the MUX chain and the shadow flip-flop
  input  logic          qs,            // Q_s, test response
  input  logic [W-1:0]  count_osc,     // COUNT_OSC
  input  logic [W-1:0]  count_ref,     // COUNT_REF
  // to the circuit and the shadow clock generator
  output logic          en,            // EN of FF0..FF3
  output logic          sen,           // SEN of the shadow flip-flop
  output logic          cal,           // CAL of the MUX chain
  output logic [N-1:0]  sel,           // SEL of the MUX chain
  output logic [CW-1:0] coarse_n,      // coarse phase shift count to the PLL
  // results
  output meas_result_t  result,        // last completed measurement
  output logic          meas_done,     // one-cycle pulse when result updates
  output logic          cal_done,      // one-cycle pulse when counts update
  output logic [W-1:0]  cal_count_osc,
  output logic [W-1:0]  cal_count_ref
);

  // SEL' table
  logic [N-1:0] sel_tbl [DEPTH];

  always_ff @(posedge clk) begin
    if (tbl_we) sel_tbl[tbl_addr] <= tbl_sel;
  end

  // Synchronizers
  logic trg_m, trg_s, trg_d, qs_m, qs_s;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      {trg_m, trg_s, trg_d, qs_m, qs_s} <= '0;
    end else begin
      trg_m <= trg;
      trg_s <= trg_m;
      trg_d <= trg_s;
      qs_m  <= qs;
      qs_s  <= qs_m;
    end
  end

  wire trg_rise = trg_s & ~trg_d;

  // State
  test_state_t      pt_state;
  search_phase_t    phase;
  cal_state_t       cal_state;
  logic [7:0]       tcnt;
  logic             en_r, sen_clk, sen_r;
  logic             e_r;
  logic [CW-1:0]    n_r;
  logic [AW-1:0]    m_r;
  logic [$clog2(CAL_LEN + CAL_TAIL + 1)-1:0] ccnt;
  logic             cal_r;
  logic [N-1:0]     cal_sel_r;

  wire [7:0] sen_at  = 8'(sen_dly) + 8'd1;
  wire [7:0] eval_at = sen_at + 8'(EVAL_WAIT);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      pt_state  <= PT_IDLE;
      phase     <= PH_FIRST;
      cal_state <= CS_IDLE;
      tcnt      <= '0;
      en_r      <= 1'b0;
      sen_clk   <= 1'b0;
      e_r       <= 1'b0;
      n_r       <= '0;
      m_r       <= '0;
      ccnt      <= '0;
      cal_r     <= 1'b0;
      cal_sel_r <= '0;
      result    <= '0;
      meas_done <= 1'b0;
      cal_done  <= 1'b0;
      cal_count_osc <= '0;
      cal_count_ref <= '0;
    end else begin
      meas_done <= 1'b0;
      cal_done  <= 1'b0;

      // ---------------- path delay test and slack search ----------------
      unique case (pt_state)
        PT_IDLE: begin
          if (test && trg_rise && cal_state == CS_IDLE) begin
            en_r     <= 1'b1;
            tcnt     <= '0;
            pt_state <= PT_EN;
          end
        end
        PT_EN, PT_WAIT: begin
          tcnt    <= tcnt + 8'd1;
          sen_clk <= (tcnt + 8'd1 == sen_at);
          if (tcnt == 8'd1) begin
            en_r     <= 1'b0;
            pt_state <= PT_WAIT;
          end
          if (tcnt == eval_at) pt_state <= PT_EVAL;
        end
        PT_EVAL: begin
          pt_state <= PT_IDLE;
          unique case (phase)
            PH_FIRST: begin
              e_r   <= qs_s;
              n_r   <= CW'(1);
              phase <= PH_COARSE;
            end
            PH_COARSE: begin
              if (qs_s != e_r) begin
                if (fine_last == '0 ||
                    (coarse_extra && int'(n_r) >= COARSE_MAX)) begin
                  result    <= '{err: 1'b1, e: e_r, n: n_r, m: m_r};
                  meas_done <= 1'b1;
                  phase     <= PH_FIRST;
                  n_r       <= '0;
                  m_r       <= '0;
                end else begin
                  if (coarse_extra) n_r <= n_r + 1'b1;
                  m_r   <= AW'(1);
                  phase <= PH_FINE;
                end
              end else if (int'(n_r) >= COARSE_MAX) begin
                result    <= '{err: 1'b1, e: e_r, n: n_r, m: m_r};
                meas_done <= 1'b1;
                phase     <= PH_FIRST;
                n_r       <= '0;
                m_r       <= '0;
              end else begin
                n_r <= n_r + 1'b1;
              end
            end
            PH_FINE: begin
              if (qs_s != e_r && m_r != fine_last) begin
                m_r <= m_r + 1'b1;
              end else begin
                result    <= '{err: (qs_s != e_r), e: e_r, n: n_r, m: m_r};
                meas_done <= 1'b1;
                phase     <= PH_FIRST;
                n_r       <= '0;
                m_r       <= '0;
              end
            end
            default: phase <= PH_FIRST;
          endcase
        end
        default: pt_state <= PT_IDLE;
      endcase

      if (!test) begin
        pt_state <= PT_IDLE;
        phase    <= PH_FIRST;
        en_r     <= 1'b0;
        sen_clk  <= 1'b0;
        n_r      <= '0;
        m_r      <= '0;
      end

      // ---------------- calibration ----------------
      unique case (cal_state)
        CS_IDLE: begin
          if (cal_req && pt_state == PT_IDLE) begin
            cal_sel_r <= cal_sel;
            cal_r     <= 1'b1;
            ccnt      <= '0;
            cal_state <= CS_RUN;
          end
        end
        CS_RUN: begin
          ccnt <= ccnt + 1'b1;
          if (int'(ccnt) == CAL_LEN - 1) begin
            cal_r     <= 1'b0;
            ccnt      <= '0;
            cal_state <= CS_TAIL;
          end
        end
        CS_TAIL: begin
          ccnt <= ccnt + 1'b1;
          if (int'(ccnt) == CAL_TAIL - 1) begin
            cal_count_osc <= count_osc;
            cal_count_ref <= count_ref;
            cal_done      <= 1'b1;
            cal_state     <= CS_IDLE;
          end
        end
        default: cal_state <= CS_IDLE;
      endcase
    end
  end

  // sen leaves in the PLL clock domain
  always_ff @(posedge clk2 or negedge rst_n) begin
    if (!rst_n) sen_r <= 1'b0;
    else        sen_r <= sen_clk;
  end

  assign en       = test ? en_r : 1'b1;
  assign sen      = test & sen_r;
  assign cal      = cal_r;
  assign sel      = (cal_state != CS_IDLE) ? cal_sel_r : sel_tbl[m_r];
  assign coarse_n = n_r;

  // A path delay test and a calibration never overlap
  a_no_overlap: assert property (@(posedge clk) disable iff (!rst_n)
    !(cal_r && pt_state != PT_IDLE));
  // The launch/capture enable lasts at most two periods
  a_en_len: assert property (@(posedge clk) disable iff (!rst_n)
    en_r |-> tcnt <= 8'd1);

endmodule
