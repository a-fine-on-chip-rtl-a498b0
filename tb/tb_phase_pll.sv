// tb_phase_pll -- checks the coarse phase shifter: for several shift counts
// n the PLL clock must follow the reference clock by 9300 + (96-n)*104 ps,
// so that each step moves it 104 ps earlier; counts above 96 act as 96.
`timescale 1ps/1ps
module tb_phase_pll;

  int checks = 0, failures = 0;
  logic       ref_clk = 1'b0, clk_pll;
  logic [6:0] n = '0;

  phase_pll u_dut (.ref_clk(ref_clk), .coarse_n(n), .clk_pll(clk_pll));

  always #5000 ref_clk = ~ref_clk;

  realtime last_ref [$];
  always @(posedge ref_clk) last_ref.push_back($realtime);

  task automatic measure(input int nn);
    int exp_ps, got;
    realtime tp;
    n = 7'(nn);
    repeat (5) @(posedge ref_clk);
    @(posedge clk_pll) tp = $realtime;
    exp_ps = 9300 + (96 - (nn > 96 ? 96 : nn)) * 104;
    // the reference edge exp_ps earlier must exist
    got = -1;
    foreach (last_ref[i]) if (int'(tp - last_ref[i]) == exp_ps) got = exp_ps;
    checks++;
    if (got != exp_ps) begin
      failures++;
      $display("FAIL: n=%0d no reference edge %0d ps before the PLL edge at %0t",
               nn, exp_ps, tp);
    end
  endtask

  initial begin
    repeat (4) @(posedge ref_clk);
    measure(0);
    measure(1);
    measure(2);
    measure(17);
    measure(50);
    measure(95);
    measure(96);
    measure(120);
    measure(3);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #10_000_000;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
