// tb_hsio_driver: presents a new random frame at every load pulse, rebuilds
// the frames from the four serial lanes (lane l carries frame bits
// [16l+15:16l], MSB first) and compares. Also checks that the two wires of
// each pair are complementary, that loads come exactly every 16 cycles and
// that a frame's first bit appears one cycle after its load edge.
`timescale 1ps/1fs
module tb_hsio_driver;
  import snspd_pkg::*;
  logic clk = 1'b0, rst_n = 1'b0;
  frame_t frame = '0;
  logic load;
  logic [NUM_LANES-1:0] p, m;
  int checks = 0, failures = 0;

  always #500 clk = ~clk;

  hsio_driver dut (.i_hsclk(clk), .i_rst_n(rst_n), .i_frame(frame),
                   .o_frame_load(load), .sdata_p(p), .sdata_m(m));

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

  frame_t sent[$];
  frame_t rx;
  int bitpos = -1;       // bit index within the lane slice being received
  int pending = 0, last_load = -1, cyc = 0, nframes = 0;

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    while (nframes < 200) begin
      @(negedge clk);
      cyc++;
      check(p == ~m, "complementary pair");
      // A frame taken on the load edge E shows its first bit after E+1.
      if (pending > 0) begin
        pending--;
        if (pending == 0) bitpos = LANE_BITS - 1;
      end
      if (bitpos >= 0) begin
        for (int l = 0; l < NUM_LANES; l++) rx[l*LANE_BITS + bitpos] = p[l];
        if (bitpos == 0) begin
          frame_t e;
          e = sent.pop_front();
          check(rx == e, "frame received");
          nframes++;
        end
        bitpos--;
      end
      if (load) begin
        if (last_load >= 0) check(cyc - last_load == LANE_BITS, "load spacing");
        last_load = cyc;
        frame = {$urandom, $urandom};
        sent.push_back(frame);
        pending = 2;
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
