// tb_therm2bin: checks the thermometer-to-binary decoder at the full
// 200-stage width against a reference count, for every clean thermometer
// code and for random codes with bubbles.
`timescale 1ps/1fs
module tb_therm2bin;
  localparam int unsigned N = snspd_pkg::FINE_STAGES;
  localparam int unsigned W = $clog2(N + 1);

  logic [N-1:0] therm;
  logic [W-1:0] bin;
  int checks = 0, failures = 0;

  therm2bin dut (.i_therm(therm), .o_bin(bin));

  task automatic check(input int exp, input string what);
    checks++;
    if (int'(bin) != exp) begin
      failures++;
      $display("FAIL %s: got %0d expected %0d", what, bin, exp);
    end
  endtask

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    // Every clean code: k ones from stage 0 upwards.
    for (int k = 0; k <= int'(N); k++) begin
      therm = '0;
      for (int i = 0; i < k; i++) therm[i] = 1'b1;
      #1;
      check(k, "clean code");
    end
    // Random codes: the result is the number of ones.
    for (int t = 0; t < 200; t++) begin
      int ones;
      ones = 0;
      for (int i = 0; i < int'(N); i++) begin
        therm[i] = 1'($urandom_range(0, 1));
        if (therm[i]) ones++;
      end
      #1;
      check(ones, "random code");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
