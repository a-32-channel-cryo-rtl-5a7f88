// tb_vernier_delay_line: drives start and stop edges with known intervals
// into the Vernier line model and checks the thermometer code (interval in
// 5 ps steps), the completion time (the slower edge leaving the line) and
// the clear when start and stop fall.
`timescale 1ps/1fs
module tb_vernier_delay_line;
  localparam int unsigned N = snspd_pkg::FINE_STAGES;

  logic         start = 1'b0, stop = 1'b0;
  logic [N-1:0] code;
  logic         done;
  int checks = 0, failures = 0;

  vernier_delay_line dut (
    .i_start(start), .i_stop(stop), .o_therm_code(code), .o_delay_done(done));

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s at %0t", what, $time);
    end
  endtask

  initial begin
    #10000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int t = 0; t < 60; t++) begin
      int dt, exp_n, settle;
      dt = 5 * $urandom_range(0, 199) + $urandom_range(1, 4);  // 1..999 ps
      exp_n = dt / 5;
      settle = (N * 25 - dt > N * 20) ? N * 25 - dt : N * 20;
      #1000;
      start = 1'b1;
      #(dt);
      stop = 1'b1;
      #(settle - 2);
      check(done == 1'b0, "done too early");
      #4;
      check(done == 1'b1, "done missing");
      check($countones(code) == exp_n, $sformatf("code count dt=%0d", dt));
      check(code == N'((N'(1) << exp_n) - 1), "thermometer shape");
      start = 1'b0;
      stop  = 1'b0;
      #1;
      check(done == 1'b0 && code == '0, "clear");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
