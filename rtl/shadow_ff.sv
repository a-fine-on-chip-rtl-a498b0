// shadow_ff -- shadow flip-flop SDFF.
//
// Samples the end point of the path under measurement, ds, on the rising
// edge of the shadow clock sclk when the capture enable sen is 1, and holds
// its output qs otherwise. The measurement controller raises sen for one
// clock period per path delay test, so exactly one shadow clock edge
// captures the test response. The flip-flop has no reset: qs is only read
// after a capture.
`timescale 1ps/1ps
module shadow_ff (
  input  logic sclk,   // SCLK, the phase-shifted shadow clock
  input  logic sen,    // SEN, capture enable
  input  logic ds,     // D_s, end point of the path under measurement
  output logic qs      // Q_s, captured test response
);

  always_ff @(posedge sclk) begin
    if (sen) qs <= ds;
  end

endmodule
