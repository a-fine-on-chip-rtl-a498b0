// tb_osc_counter -- drives an oscillator of random period and a cal window
// from an unrelated clock. The count must equal the number of oscillator
// edges whose cal sample, taken two edges earlier, is high (the two-flop
// synchronizer), restart with each window and hold between windows.
`timescale 1ps/1ps
module tb_osc_counter;

  int checks = 0, failures = 0;
  logic        osc = 1'b0, rst_n = 1'b0, cal = 1'b0;
  logic [15:0] count_osc;
  int unsigned half_ps = 13000;
  int          expected = 0;
  logic [1:0]  hist = '0;
  logic        in_win = 1'b0;

  osc_counter u_dut (.osc(osc), .rst_n(rst_n), .cal(cal), .count_osc(count_osc));

  always #(half_ps) osc = ~osc;

  // reference model: a run of edges with the delayed sample high
  always @(posedge osc) begin
    if (rst_n) begin
      if (hist[1]) begin
        expected = in_win ? expected + 1 : 1;
        in_win   = 1'b1;
      end else begin
        in_win   = 1'b0;
      end
      hist = {hist[0], cal};
    end
  end

  task automatic window(input int len_ps);
    #(7 + $urandom % 20000);
    cal = 1'b1;
    #(len_ps);
    cal = 1'b0;
    #(10 * half_ps);
    checks++;
    if (int'(count_osc) != expected) begin
      failures++;
      $display("FAIL: counted %0d expected %0d", count_osc, expected);
    end
    checks++;
    if (expected < len_ps / int'(2 * half_ps) - 1) begin
      failures++;
      $display("FAIL: reference model counted too little");
    end
  endtask

  initial begin
    #30000 rst_n = 1'b1;
    window(500000);
    half_ps = 12345;
    window(1000000);
    for (int k = 0; k < 5; k++) begin
      half_ps = 6000 + $urandom % 9000;
      window(100000 + int'($urandom % 900000));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100_000_000;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
