// tb_readout_subsystem: directed scenarios on the full 32-channel readout:
// round-robin order, dynamic priority order, FIFO overflow with drop and
// event counters, channel mask, hit-pattern and configuration frame
// injection, and the parity bit. Frames are taken the way the serializer
// takes them, one i_frame_load pulse at a time; every taken frame is checked
// against the testbench's own expectation.
`timescale 1ps/1fs
module tb_readout_subsystem;
  import snspd_pkg::*;
  localparam int NCH = NUM_CH;
  localparam int CW  = COARSE_BITS;
  localparam int FW  = FINE_BITS;

  logic clk = 1'b0, rst_n = 1'b0, load = 1'b0;
  readout_cfg_t cfg;
  logic [NCH-1:0][PRIO_BITS-1:0] prio = '0;
  logic [NCH-1:0][CW-1:0] count = '0;
  logic [NCH-1:0][FW-1:0] dout = '0;
  logic [NCH-1:0]         valid = '0;
  frame_t                 frame;
  logic [NCH-1:0][7:0]    drop_cnt, evt_cnt;
  int checks = 0, failures = 0;

  always #500 clk = ~clk;

  readout_subsystem dut (
    .i_hsclk(clk), .i_rst_n(rst_n), .i_cfg(cfg), .i_prio(prio), .i_count(count),
    .i_dout(dout), .i_valid(valid), .i_frame_load(load), .o_frame(frame),
    .o_drop_cnt(drop_cnt), .o_evt_cnt(evt_cnt));

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s at %0t", what, $time);
    end
  endtask

  initial begin
    #100000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Timestamp used for channel c, event k: recognisable and unique.
  function automatic logic [CW+FW-1:0] ts_of(input int c, input int k);
    return {CW'(c * 7 + k), FW'((c * 13 + k * 3) % 201)};
  endfunction

  // Report one event on each channel set in chans, all in the same cycle.
  task automatic events(input logic [NCH-1:0] chans, input int k);
    @(negedge clk);
    for (int c = 0; c < NCH; c++) begin
      valid[c] = chans[c];
      {count[c], dout[c]} = ts_of(c, k);
    end
    @(negedge clk);
    valid = '0;
  endtask

  // Take one frame and check its parity bit.
  task automatic take(output frame_t f);
    @(negedge clk);
    load = 1'b1;
    f = frame;
    @(negedge clk);
    load = 1'b0;
    checks++;
    if (cfg.parity_en ? (f[0] != frame_parity(f)) : (f[0] != 1'b0)) begin
      failures++;
      $display("FAIL parity bit");
    end
  endtask

  task automatic expect_ts(input int c, input int k);
    frame_t f;
    take(f);
    check(f[63:62] == FT_TSTAMP, $sformatf("type for ch%0d", c));
    check(int'(f[61:57]) == c, $sformatf("channel %0d expected %0d", f[61:57], c));
    check(f[56 -: CW+FW] == ts_of(c, k), "timestamp");
  endtask

  task automatic expect_idle();
    frame_t f;
    take(f);
    check(f[63:1] == '0, "idle frame");
  endtask

  initial begin
    cfg = '0;
    cfg.ch_mask   = '1;
    cfg.parity_en = 1'b1;
    cfg.mode      = ARB_FIXED;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    expect_idle();

    // Round robin: channels 3, 7, 20; then 2 and 25 after 20 was served
    // last: the scan continues at 21, so 25 comes before 2.
    events(NCH'(1) << 3 | NCH'(1) << 7 | NCH'(1) << 20, 0);
    expect_ts(3, 0); expect_ts(7, 0); expect_ts(20, 0);
    events(NCH'(1) << 2 | NCH'(1) << 25, 1);
    expect_ts(25, 1); expect_ts(2, 1);
    // Round robin with a refill in between: 0 and 1 pending, 1 served last
    // after 0; a new event on 0 waits until others were visited.
    events(NCH'(1) << 0 | NCH'(1) << 1 | NCH'(1) << 9, 2);
    expect_ts(9, 2);           // first requester after channel 2
    events(NCH'(1) << 4, 3);
    expect_ts(0, 2); expect_ts(1, 2); expect_ts(4, 3);
    expect_idle();

    // Dynamic priority: 10 and 20 at priority 9, 4 at 2, 30 at 0.
    cfg.mode = ARB_DYNAMIC;
    prio[10] = 4'd9; prio[20] = 4'd9; prio[4] = 4'd2;
    events(NCH'(1) << 30 | NCH'(1) << 4 | NCH'(1) << 10 | NCH'(1) << 20, 4);
    expect_ts(10, 4); expect_ts(20, 4); expect_ts(4, 4); expect_ts(30, 4);
    // A higher-priority arrival overtakes waiting channels.
    events(NCH'(1) << 30 | NCH'(1) << 4, 5);
    expect_ts(4, 5);
    events(NCH'(1) << 20, 6);
    expect_ts(20, 6); expect_ts(30, 5);

    // Overflow: six events on channel 1 with no frame taken; 4 are kept.
    cfg.mode = ARB_FIXED;
    for (int k = 10; k < 16; k++) events(NCH'(1) << 1, k);
    check(drop_cnt[1] == 8'd2, $sformatf("drop count %0d", drop_cnt[1]));
    for (int k = 10; k < 14; k++) expect_ts(1, k);
    expect_idle();

    // Channel mask: channel 6 masked out.
    cfg.ch_mask[6] = 1'b0;
    events(NCH'(1) << 6 | NCH'(1) << 8, 20);
    expect_ts(8, 20);
    expect_idle();
    check(evt_cnt[6] == 8'd0 && evt_cnt[8] == 8'd1, "event counters and mask");
    cfg.ch_mask[6] = 1'b1;

    // Injection every 4 frames: after 4 frames a hit pattern (channels that
    // reported since the last one) and a configuration frame follow.
    cfg.interval = 8'd4;
    cfg.inj_hit  = 1'b1;
    cfg.inj_cfg  = 1'b1;
    cfg.ctrl_byte = 8'h5A;
    begin
      frame_t f;
      int cnt;
      // The first pattern covers everything since reset; flush it.
      cnt = 0;
      do begin take(f); cnt++; end while (f[63:62] != FT_CONFIG && cnt < 8);
      check(f[63:62] == FT_CONFIG, "first injection");
      events(NCH'(1) << 11 | NCH'(1) << 31, 30);
      cnt = 0;
      // Frames until the hit pattern shows up (at most 5).
      do begin take(f); cnt++; end while (f[63:62] != FT_HITPAT && cnt < 6);
      check(f[63:62] == FT_HITPAT, "hit pattern injected");
      check(cnt <= 5, "injection interval");
      check(f[61:30] == (NCH'(1) << 11 | NCH'(1) << 31), "hit pattern bits");
      take(f);
      check(f[63:62] == FT_CONFIG, "config injected");
      check(f[61:54] == 8'h5A && f[53:46] == 8'd4 && f[45:14] == cfg.ch_mask, "config contents");
      // Next pattern only shows channels hit after the previous one.
      events(NCH'(1) << 17, 31);
      cnt = 0;
      do begin take(f); cnt++; end while (f[63:62] != FT_HITPAT && cnt < 8);
      check(f[61:30] == (NCH'(1) << 17), "hit pattern restarted");
    end

    // Parity off: bit 0 stays clear.
    cfg.parity_en = 1'b0;
    cfg.inj_hit = 1'b0; cfg.inj_cfg = 1'b0;
    events(NCH'(1) << 12, 40);
    begin
      frame_t f;
      int cnt;
      cnt = 0;
      do begin take(f); cnt++; end while (f[63:62] != FT_TSTAMP && cnt < 4);
      check(int'(f[61:57]) == 12 && f[56 -: CW+FW] == ts_of(12, 40), "timestamp without parity");
    end

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
