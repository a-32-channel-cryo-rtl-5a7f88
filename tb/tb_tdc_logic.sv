// tb_tdc_logic: one fine TDC channel (tdc_logic with the Vernier line
// model) at the 200-stage default. Events are placed at random offsets inside
// a 1 ns clock period; the testbench checks that the stop edge is the next
// clock edge, that the fine code equals the event-to-edge interval in 5 ps
// steps, that o_dout_valid pulses exactly once, 8 clock edges after the stop
// edge, that an event arriving while the channel is busy is ignored, and
// that the channel re-arms itself for the next event.
`timescale 1ps/1fs
module tb_tdc_logic;
  localparam int unsigned N = snspd_pkg::FINE_STAGES;
  localparam int unsigned W = $clog2(N + 1);
  localparam int T = 1000;

  logic clk = 1'b0, rst_n = 1'b1, ev = 1'b0;
  logic start, stop, done, sample, valid;
  logic [N-1:0] therm;
  logic [W-1:0] dout;
  int checks = 0, failures = 0;
  int cyc = 0;

  always #(T/2) clk = ~clk;
  always @(posedge clk) cyc++;

  vernier_delay_line u_line (
    .i_start(start), .i_stop(stop), .o_therm_code(therm), .o_delay_done(done));
  tdc_logic dut (
    .i_hsclk(clk), .i_rst_n(rst_n), .i_event(ev), .o_start(start), .o_stop(stop),
    .i_delay_therm_code(therm), .i_delay_done(done), .o_sample(sample),
    .o_dout(dout), .o_dout_valid(valid));

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s at %0t", what, $time);
    end
  endtask

  initial begin
    #5000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int valid_count = 0;
  always @(posedge clk) if (valid) valid_count++;

  initial begin
    // The start flop is clocked by the event only: give its asynchronous
    // clear an edge after the clock has reset the rest.
    #1 rst_n = 1'b0;
    repeat (3) @(negedge clk);
    #100 rst_n = 1'b1;
    #100 rst_n = 1'b0;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    repeat (3) @(negedge clk);
    for (int t = 0; t < 80; t++) begin
      int off, dt, exp_code, stop_cyc, vc0;
      bit busy_hit;
      busy_hit = (t % 4 == 3);
      @(posedge clk);
      off = 5 * $urandom_range(1, 198) + $urandom_range(1, 4);  // into the period
      #(off);
      ev = 1'b1;
      dt = T - off;
      exp_code = dt / 5;
      vc0 = valid_count;
      @(posedge clk);
      #1;
      stop_cyc = cyc;
      check(stop == 1'b1 && sample == 1'b1, "stop on next edge");
      #100;
      ev = 1'b0;
      if (busy_hit) begin
        // A second event while the measurement is still running.
        #300;
        ev = 1'b1;
        #200;
        ev = 1'b0;
      end
      while (!valid) @(negedge clk);
      check(cyc - stop_cyc == 8, $sformatf("latency %0d", cyc - stop_cyc));
      check(int'(dout) == exp_code, $sformatf("code %0d expected %0d", dout, exp_code));
      @(negedge clk);
      check(!valid, "valid one cycle");
      repeat (4) @(negedge clk);
      check(valid_count == vc0 + 1, "exactly one result per event");
      check(!start && !stop, "re-armed");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
