// tb_shadow_ff -- random ds/sen sequences on the shadow flip-flop; the
// output must take ds on a clock edge with sen=1 and hold otherwise.
`timescale 1ps/1ps
module tb_shadow_ff;

  int checks = 0, failures = 0;
  logic sclk = 1'b0, sen = 1'b0, ds = 1'b0, qs;
  logic model;

  shadow_ff u_dut (.sclk(sclk), .sen(sen), .ds(ds), .qs(qs));

  always #5000 sclk = ~sclk;

  initial begin
    @(negedge sclk) begin sen = 1'b1; ds = 1'b0; end
    @(posedge sclk) model = 1'b0;
    for (int k = 0; k < 200; k++) begin
      @(negedge sclk) begin
        sen = 1'($urandom);
        ds  = 1'($urandom);
      end
      @(posedge sclk) if (sen) model = ds;
      #1;
      checks++;
      if (qs !== model) begin
        failures++;
        $display("FAIL: step %0d sen=%0b ds=%0b qs=%0b expected %0b", k, sen, ds, qs, model);
      end
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
