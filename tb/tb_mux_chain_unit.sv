// tb_mux_chain_unit -- checks the MUX chain with its calibration counters.
//
// With cal=0 the output must follow the input clock by the selected chain
// delay. With cal held for CAL clocks, COUNT_REF must equal CAL and the
// chain delay worked out from the counts, (COUNT_REF*T/COUNT_OSC)/2 - t_fb,
// must be within 60 ps of the sum of the selected wire delays (independent
// copy of the table here), for several select words. A second window on the
// same word must give the same counts to within one.
`timescale 1ps/1ps
module tb_mux_chain_unit;

  localparam int D0 [16] = '{953, 975, 779, 892, 596, 975, 779, 892,
                             707, 975, 778, 892, 596, 975, 778, 892};
  localparam int D1 [16] = '{827, 869, 948, 605, 707, 774, 948, 718,
                             826, 774, 843, 718, 707, 869, 843, 718};
  localparam int CAL  = 2048;
  localparam int TFB  = 400;

  int checks = 0, failures = 0;
  logic        clk = 1'b0, in_clk = 1'b0, rst_n = 1'b0, cal = 1'b0, out;
  logic [15:0] sel = '0, count_osc, count_ref;

  mux_chain_unit u_dut (.in_clk(in_clk), .clk(clk), .rst_n(rst_n), .cal(cal),
                        .sel(sel), .out(out), .count_osc(count_osc),
                        .count_ref(count_ref));

  always #5000 clk = ~clk;
  always @(clk) in_clk <= #3000 clk;   // PLL clock: 3 ns behind

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  function automatic int tchain(input logic [15:0] s);
    int t = 0;
    for (int i = 0; i < 16; i++) t += s[i] ? D1[i] : D0[i];
    return t;
  endfunction

  task automatic calibrate(input logic [15:0] s, output int osc);
    real t_meas;
    sel = s;
    @(posedge clk) cal <= 1'b1;
    repeat (CAL) @(posedge clk);
    cal <= 1'b0;
    repeat (16) @(posedge clk);
    t_meas = real'(count_ref) * 10000.0 / real'(count_osc) / 2.0 - TFB;
    check(int'(count_ref) == CAL, $sformatf("COUNT_REF %0d", count_ref));
    check(t_meas > tchain(s) - 60.0 && t_meas < tchain(s) + 60.0,
          $sformatf("SEL %h: calibrated %0.1f ps, chain %0d ps", s, t_meas, tchain(s)));
    osc = int'(count_osc);
  endtask

  task automatic pass_delay(input logic [15:0] s);
    realtime t0;
    int d;
    sel = s;
    repeat (4) @(posedge clk);
    @(posedge in_clk) t0 = $realtime;
    @(posedge out);
    d = int'($realtime - t0) % 10000;
    check(d == tchain(s) % 10000, $sformatf("SEL %h: delay %0d ps mod T, expected %0d",
                                            s, d, tchain(s) % 10000));
  endtask

  initial begin : main
    int o1, o2;
    repeat (2) @(posedge clk);
    rst_n <= 1'b1;
    pass_delay(16'h0000);
    pass_delay(16'hFFFF);
    calibrate(16'h0000, o1);
    calibrate(16'hFFFF, o1);
    calibrate(16'h1234, o1);
    calibrate(16'h1234, o2);
    check(o1 - o2 <= 1 && o2 - o1 <= 1, "repeatable count");
    for (int k = 0; k < 3; k++) calibrate(16'($urandom), o1);
    pass_delay(16'h8421);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #500_000_000;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
