// tb_mux_chain_delay -- checks the MUX chain delay model.
//
// a) A 4-stage chain with wire delays 560/400, 540/580, 480/500, 560/500 ps
//    (d_i0/d_i1): S0S1S2S3 = 0011, 0010, 0110 must give 2.10, 2.16 and
//    2.20 ns from IN to OUT.
// b) The default 16-stage chain: the delay for the all-short and all-long
//    select words must be 11.885 ns and 14.243 ns, and random select words
//    must give the sum of the selected wire delays (independent copy of the
//    table here).
// c) cal=1 on a drained chain: the ring period must be 2*(t_chain + t_fb).
`timescale 1ps/1ps
module tb_mux_chain_delay;

  localparam int D0 [16] = '{953, 975, 779, 892, 596, 975, 779, 892,
                             707, 975, 778, 892, 596, 975, 778, 892};
  localparam int D1 [16] = '{827, 869, 948, 605, 707, 774, 948, 718,
                             826, 774, 843, 718, 707, 869, 843, 718};
  localparam int unsigned EX0 [4] = '{560, 540, 480, 560};
  localparam int unsigned EX1 [4] = '{400, 580, 500, 500};

  int checks = 0, failures = 0;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  // 4-stage example chain
  logic       in4 = 1'b0, cal4 = 1'b0, out4;
  logic [3:0] sel4 = '0;
  mux_chain_delay #(.N(4), .D0_PS(EX0), .D1_PS(EX1), .T_FB_PS(300)) u_ex (
    .in_clk(in4), .cal(cal4), .sel(sel4), .out(out4));

  // default 16-stage chain
  logic        in16 = 1'b0, cal16 = 1'b0, out16;
  logic [15:0] sel16 = '0;
  mux_chain_delay u_dut (.in_clk(in16), .cal(cal16), .sel(sel16), .out(out16));

  function automatic int tchain(input logic [15:0] s);
    int t = 0;
    for (int i = 0; i < 16; i++) t += s[i] ? D1[i] : D0[i];
    return t;
  endfunction

  // S0 is sel[0]: the word S0S1S2S3 written left to right maps to sel[0..3]
  task automatic delay4(input logic [3:0] s0s1s2s3, input int exp_ps);
    realtime t0;
    sel4 = {s0s1s2s3[0], s0s1s2s3[1], s0s1s2s3[2], s0s1s2s3[3]};
    #5000;
    t0  = $realtime;
    in4 = 1'b1;
    @(posedge out4);
    check(int'($realtime - t0) == exp_ps,
          $sformatf("4-stage %b: %0d ps, expected %0d", s0s1s2s3, int'($realtime - t0), exp_ps));
    #5000 in4 = 1'b0;
    #5000;
  endtask

  task automatic delay16(input logic [15:0] s);
    realtime t0;
    sel16 = s;
    #20000;
    t0   = $realtime;
    in16 = 1'b1;
    @(posedge out16);
    check(int'($realtime - t0) == tchain(s),
          $sformatf("16-stage %h: %0d ps, expected %0d", s, int'($realtime - t0), tchain(s)));
    #20000 in16 = 1'b0;
    #20000;
  endtask

  initial begin : main
    realtime r1, r2;
    #1000;
    delay4(4'b0011, 2100);
    delay4(4'b0010, 2160);
    delay4(4'b0110, 2200);

    delay16(16'h0000);
    delay16(16'hFFFF);
    check(tchain(16'h5A31) > 0, "table sanity");
    // all-short / all-long words: bit i = 1 where d_i1 < d_i0
    begin
      logic [15:0] smin, smax;
      for (int i = 0; i < 16; i++) begin
        smin[i] = D1[i] < D0[i];
        smax[i] = !(D1[i] < D0[i]);
      end
      delay16(smin);
      check(tchain(smin) == 11885, "minimum chain delay is 11.885 ns");
      delay16(smax);
      check(tchain(smax) == 14243, "maximum chain delay is 14.243 ns");
    end
    for (int k = 0; k < 20; k++) delay16(16'($urandom));

    // ring oscillator
    sel16 = 16'h3C5A;
    #30000;
    cal16 = 1'b1;
    repeat (3) @(posedge out16);
    r1 = $realtime;
    repeat (10) @(posedge out16);
    r2 = $realtime;
    check(int'((r2 - r1) / 10) == 2 * (tchain(16'h3C5A) + 400),
          $sformatf("ring period %0d ps, expected %0d", int'((r2 - r1) / 10),
                    2 * (tchain(16'h3C5A) + 400)));
    cal16 = 1'b0;

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #50_000_000;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
