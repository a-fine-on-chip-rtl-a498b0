// ref_counter -- reference counter of the MUX chain calibration.
//
// Counts the system clock cycles during which cal is high, giving
// COUNT_REF: the length of the calibration window in reference clock
// periods. A rising edge of cal restarts the count at 1; the count
// saturates at all ones and is held while cal is low. With the period of
// the reference clock known, COUNT_REF / COUNT_OSC times that period is
// the ring oscillator period.
//
// The document names the counter and its output; the restart rule and the
// saturation are this design's choices.
`timescale 1ps/1ps
module ref_counter #(
  parameter int unsigned W = odm_pkg::CNT_W
) (
  input  logic         clk,       // reference (system) clock
  input  logic         rst_n,     // asynchronous reset, active low
  input  logic         cal,       // calibration active, synchronous to clk
  output logic [W-1:0] count_ref  // COUNT_REF
);

  logic cal_d;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      cal_d     <= 1'b0;
      count_ref <= '0;
    end else begin
      cal_d <= cal;
      if (cal) begin
        if (!cal_d)           count_ref <= W'(1);
        else if (~&count_ref) count_ref <= count_ref + 1'b1;
      end
    end
  end

endmodule
