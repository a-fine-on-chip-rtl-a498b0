// tb_ref_counter -- the reference count must equal the number of clock
// edges with cal high, restart at each calibration and hold between them.
`timescale 1ps/1ps
module tb_ref_counter;

  int checks = 0, failures = 0;
  logic        clk = 1'b0, rst_n = 1'b0, cal = 1'b0;
  logic [15:0] count_ref;

  ref_counter u_dut (.clk(clk), .rst_n(rst_n), .cal(cal), .count_ref(count_ref));

  always #5000 clk = ~clk;

  task automatic window(input int len);
    @(posedge clk) cal <= 1'b1;
    repeat (len) @(posedge clk);
    cal <= 1'b0;
    repeat (5) @(posedge clk);
    checks++;
    if (int'(count_ref) != len) begin
      failures++;
      $display("FAIL: window %0d counted %0d", len, count_ref);
    end
  endtask

  initial begin
    repeat (2) @(posedge clk);
    rst_n <= 1'b1;
    @(posedge clk);
    checks++;
    if (count_ref != '0) begin failures++; $display("FAIL: not reset"); end
    window(1);
    window(37);
    window(8192);
    window(5);
    for (int k = 0; k < 5; k++) window(1 + int'($urandom % 300));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #1_000_000_000;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
