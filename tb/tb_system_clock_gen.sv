// tb_system_clock_gen -- checks that the system clock starts low and has a
// 10 ns period with a 50 % duty cycle.
`timescale 1ps/1ps
module tb_system_clock_gen;

  int checks = 0, failures = 0;
  logic clk;

  system_clock_gen u_dut (.clk(clk));

  initial begin : main
    realtime tr, tf, tr2;
    #1;
    checks++;
    if (clk !== 1'b0) begin failures++; $display("FAIL: clock does not start low"); end
    for (int k = 0; k < 20; k++) begin
      @(posedge clk) tr = $realtime;
      @(negedge clk) tf = $realtime;
      @(posedge clk) tr2 = $realtime;
      checks += 2;
      if (int'(tr2 - tr) != 10000) begin
        failures++;
        $display("FAIL: period %0d ps", int'(tr2 - tr));
      end
      if (int'(tf - tr) != 5000) begin
        failures++;
        $display("FAIL: high time %0d ps", int'(tf - tr));
      end
    end
    checks++;
    if (int'(tr) % 10000 != 5000) begin
      failures++;
      $display("FAIL: rising edges are not at 5 ns + k*10 ns");
    end
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
