// tb_clock_controller: checks that the counter clock has a period of 256
// fast-clock cycles, is high for the first half of each, rises exactly when
// the cycle count since reset is a multiple of 256, and that the enable
// takes effect only at such a rollover.
`timescale 1ps/1fs
module tb_clock_controller;
  logic clk = 1'b0, rst_n = 1'b0, en = 1'b1, cclk;
  int checks = 0, failures = 0;
  int n = 0;

  always #500 clk = ~clk;

  clock_controller dut (.i_hsclk(clk), .i_rst_n(rst_n), .i_cclk_en(en), .o_cclk(cclk));

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s at cycle %0d", what, n);
    end
  endtask

  initial begin
    #20000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // n counts rising edges since reset release.
  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    while (n < 256 * 12) begin
      @(posedge clk);
      n++;
      #1;
      // Expected: enabled from the first rollover on, except between the
      // rollovers at 256*6 and 256*8, where en is low.
      begin
        bit exp_en, exp_c;
        exp_en = (n >= 256) && !(n >= 256 * 6 && n < 256 * 8);
        exp_c  = exp_en && ((n % 256) < 128);
        check(cclk == exp_c, "cclk level");
      end
      // Drop the enable mid-period; it must wait for the rollover.
      if (n == 256 * 5 + 40) en = 1'b0;
      if (n == 256 * 7 + 90) en = 1'b1;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
