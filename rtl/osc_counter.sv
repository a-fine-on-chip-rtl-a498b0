// osc_counter -- oscillation counter of the MUX chain calibration.
//
// Counts the rising edges of the ring oscillator output osc (the MUX chain
// output OUT) while calibration is active, giving COUNT_OSC. The counter is
// clocked by osc itself; cal comes from the system clock domain and is
// brought in through a two-flop synchronizer. The first osc edge that sees
// the synchronized cal high restarts the count at 1, later ones increment
// it; the count saturates at all ones and is held while cal is low, so the
// system clock domain can read it once cal has been low for a few cycles.
// After cal falls the chain carries the PLL clock again, which clocks the
// synchronizer so that the count stops. The two synchronizer edges lost at
// the start roughly equal the two counted after the end; the remaining
// error is at most a few counts per calibration.
//
// The document names the counter and its output; the synchronizer, the
// restart rule and the saturation are this design's choices.
`timescale 1ps/1ps
module osc_counter #(
  parameter int unsigned W = odm_pkg::CNT_W
) (
  input  logic         osc,       // ring oscillator output (clock)
  input  logic         rst_n,     // asynchronous reset, active low
  input  logic         cal,       // calibration active (other clock domain)
  output logic [W-1:0] count_osc  // COUNT_OSC
);

  logic cal_m, cal_s, cal_d;

  always_ff @(posedge osc or negedge rst_n) begin
    if (!rst_n) begin
      cal_m     <= 1'b0;
      cal_s     <= 1'b0;
      cal_d     <= 1'b0;
      count_osc <= '0;
    end else begin
      cal_m <= cal;
      cal_s <= cal_m;
      cal_d <= cal_s;
      if (cal_s) begin
        if (!cal_d)               count_osc <= W'(1);
        else if (~&count_osc)     count_osc <= count_osc + 1'b1;
      end
    end
  end

endmodule
