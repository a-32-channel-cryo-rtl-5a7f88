// tb_snspd_readout_top: end-to-end test of the complete readout core at its
// default size (32 channels, 200-stage fine TDCs, 8-bit coarse counter,
// 4 lanes, 5120-byte register file), with nothing overridden.
//
// The testbench acts as the analog front ends (pulses on i_event at chosen
// picosecond offsets from the 1 ns clock), as the configuring host (serial
// transactions on the gppi_* pins) and as the receiving FPGA (it rebuilds
// 64-bit frames from the four lanes). For every event it works out the
// timestamp the chip must report: the coarse count is the number of clock
// edges since reset, modulo 256, at the first edge after the event; the fine
// code is the event-to-edge interval in 5 ps steps. It then checks every
// received frame: parity, timestamps in order per channel, round-robin
// order in fixed priority mode, priority order in dynamic priority mode,
// hit-pattern and configuration contents, and at the end the dropped-event
// and event counters read back through the serial interface. Each mechanism
// is counted and must occur at least once.
`timescale 1ps/1fs
module tb_snspd_readout_top;
  import snspd_pkg::*;
  localparam int T    = 1000;  // clock period, ps
  localparam int HALF = 16;    // core cycles per half gppi_clk period

  logic clk = 1'b0, rst_n = 1'b1;
  logic [NUM_CH-1:0] ev = '0;
  logic sclk = 1'b0, sel = 1'b0, sdi = 1'b0, sdo, cclk_pin;
  logic [NUM_LANES-1:0] sp, sm;
  logic [NUM_CH-1:0][7:0] rch_ibias, rch_imp;
  logic [NUM_BIAS-1:0][7:0] bch_ibias, bch_imp;
  int checks = 0, failures = 0;
  int n = 0;   // rising clock edges since reset release

  always #(T/2) clk = ~clk;
  always @(posedge clk) if (rst_n) n = n + 1;

  snspd_readout_top dut (
    .i_hsclk(clk), .i_rst_n(rst_n), .i_event(ev),
    .gppi_clk(sclk), .gppi_sel(sel), .gppi_sdi(sdi), .gppi_sdo(sdo), .gppi_cclk(cclk_pin),
    .sdata_p(sp), .sdata_m(sm),
    .o_rch_ibias(rch_ibias), .o_rch_imp(rch_imp), .o_bch_ibias(bch_ibias), .o_bch_imp(bch_imp));

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 30) $display("FAIL %s at edge %0d", what, n);
    end
  endtask

  initial begin
    #3000000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ------------------------------------------------------------ mechanisms
  int m_ts = 0, m_rr = 0, m_dyn = 0, m_switch = 0, m_hit = 0, m_cfg = 0;
  int m_parity = 0, m_drop = 0, m_rollover = 0, m_cclk = 0, m_rearm = 0;
  int m_mask = 0, m_busy = 0, m_csr_rd = 0, m_all32 = 0;

  // ------------------------------------------------------- host side state
  logic [7:0]        ctrl = 8'h18, interval = 8'd0;
  logic [NUM_CH-1:0] mask = '1;
  int                last_cfg_write = -1000;
  bit                cfg_writing = 1'b0;

  task automatic ser_xfer(input bit w, input int a, input logic [7:0] d,
                          output logic [7:0] rd);
    logic [23:0] word;
    word = {w, 15'(a), d};
    rd = '0;
    sel = 1'b1;
    repeat (HALF) @(negedge clk);
    for (int i = 23; i >= 0; i--) begin
      sdi = word[i];
      repeat (HALF) @(negedge clk);
      sclk = 1'b1;
      if (i < 8) rd[i] = sdo;
      repeat (HALF) @(negedge clk);
      sclk = 1'b0;
    end
    repeat (HALF) @(negedge clk);
    sel = 1'b0;
    repeat (HALF) @(negedge clk);
  endtask

  task automatic csr_wr(input int a, input logic [7:0] d);
    logic [7:0] unused;
    cfg_writing = 1'b1;
    ser_xfer(1'b1, a, d, unused);
    cfg_writing = 1'b0;
    if (a == int'(A_CTRL)) begin
      if (d[CTRL_MODE] != ctrl[CTRL_MODE]) m_switch++;
      ctrl = d;
    end
    if (a == int'(A_INTERVAL)) interval = d;
    if (a >= int'(A_CHMASK) && a < int'(A_CHMASK) + 4) mask[(a - int'(A_CHMASK)) * 8 +: 8] = d;
    last_cfg_write = n;
  endtask

  task automatic csr_rd(input int a, output logic [7:0] d);
    ser_xfer(1'b0, a, 8'h00, d);
    m_csr_rd++;
  endtask

  // --------------------------------------------------------- event source
  typedef logic [TS_BITS-1:0] ts_t;
  ts_t exp_q [NUM_CH][$];
  int  fired [NUM_CH];
  int  skipped [NUM_CH];
  int  got [NUM_CH];

  // Fire an event on channel c, 'off' ps after the clock edge just passed
  // (the caller stands 1 ps after that edge). Records the expected result.
  task automatic fire(input int c, input int off, input bit expect_result);
    int stop_edge, fine;
    stop_edge = n + 1;
    fine = (T - off) / 5;
    if (expect_result && mask[c]) begin
      exp_q[c].push_back({COARSE_BITS'(stop_edge % 256), FINE_BITS'(fine)});
    end
    if (mask[c]) begin
      fired[c]++;
      hit_seen_since[c] = 1'b1;
    end
    fork
      automatic int cc = c;
      automatic int dd = off - 1;
      begin
        #(dd);
        ev[cc] = 1'b1;
        #3000;
        ev[cc] = 1'b0;
      end
    join_none
  endtask

  function automatic int rand_off();
    return 5 * $urandom_range(1, 198) + $urandom_range(1, 4);
  endfunction

  task automatic after_edges(input int k);
    repeat (k) @(posedge clk);
    #1;
  endtask

  // -------------------------------------------------------- frame receiver
  // The serializer takes frame j on edge 16j; its bits show on the lanes
  // after edges 16j+1 .. 16j+16.
  frame_t rx;
  int     burst_log [$];       // channels of timestamp frames, in order
  logic   [NUM_CH-1:0] hit_seen_since = '0;   // channels fired so far
  int     prev_coarse = -1;

  function automatic void handle_ts(input int c, input ts_t ts);
    int k;
    k = 0;
    while (exp_q[c].size() > 0 && exp_q[c][0] != ts) begin
      void'(exp_q[c].pop_front());
      skipped[c]++;
      k++;
    end
    checks++;
    if (exp_q[c].size() == 0) begin
      failures++;
      if (failures < 30) $display("FAIL unexpected timestamp ch%0d %0h at edge %0d", c, ts, n);
    end else begin
      void'(exp_q[c].pop_front());
      got[c]++;
      m_ts++;
      if (got[c] >= 2) m_rearm++;
    end
    if (prev_coarse >= 0 && int'(ts[TS_BITS-1 -: COARSE_BITS]) < prev_coarse - 64) m_rollover++;
    prev_coarse = int'(ts[TS_BITS-1 -: COARSE_BITS]);
    burst_log.push_back(c);
  endfunction

  always @(negedge clk) if (rst_n) begin
    check(sp == ~sm, "lane pairs complementary");
    if (n >= 17) begin
      int bp;
      bp = 15 - ((n - 17) % 16);
      for (int l = 0; l < NUM_LANES; l++) rx[l * LANE_BITS + bp] = sp[l];
      if (bp == 0) begin
        if (ctrl[CTRL_PARITY] && !cfg_writing && n - last_cfg_write > 40) begin
          check(rx[0] == frame_parity(rx), "frame parity");
          m_parity++;
        end
        case (frame_type_e'(rx[63:62]))
          FT_TSTAMP: handle_ts(int'(rx[61:57]), rx[56 -: TS_BITS]);
          FT_HITPAT: begin
            m_hit++;
            check((rx[61:30] & ~hit_seen_since) == '0, "hit pattern bits");
          end
          FT_CONFIG: begin
            m_cfg++;
            if (!cfg_writing && n - last_cfg_write > 40)
              check(rx[61:54] == ctrl && rx[53:46] == interval && rx[45:14] == mask,
                    "configuration frame contents");
          end
          default: check(rx[61:1] == '0, "idle frame");
        endcase
      end
    end
  end

  // The counter clock pin rises at every coarse rollover.
  logic cclk_q = 1'b0;
  always @(negedge clk) if (rst_n) begin
    cclk_q <= cclk_pin;
    if (cclk_pin && !cclk_q) begin
      m_cclk++;
      check(n % 256 == 0, "counter clock rises at rollover");
    end
  end

  // Fire a burst on the given channels at the same edge with one offset,
  // then return the order in which they came out.
  task automatic burst(input logic [NUM_CH-1:0] chans, output int order [$]);
    int off;
    burst_log.delete();
    off = rand_off();
    after_edges(1);
    for (int c = 0; c < NUM_CH; c++) if (chans[c]) fire(c, off, 1'b1);
    after_edges(16 * ($countones(chans) + 4));
    order = burst_log;
  endtask

  initial begin
    logic [7:0] d;
    int order [$];
    for (int c = 0; c < NUM_CH; c++) begin fired[c] = 0; skipped[c] = 0; got[c] = 0; end
    // Reset: held over a few clock edges, released briefly and asserted
    // again, so that the event-clocked start flops see an edge of their
    // asynchronous clear.
    #1 rst_n = 1'b0;
    repeat (3) @(negedge clk);
    #100 rst_n = 1'b1;
    #100 rst_n = 1'b0;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    after_edges(20);

    // --- Register access: analog settings and read-back.
    csr_wr(int'(A_RCH_IBIAS) + 3, 8'd57);
    csr_wr(int'(A_RCH_IMP) + 31, 8'd200);
    csr_wr(int'(A_BCH_IBIAS) + 4, 8'd99);
    csr_wr(int'(A_BCH_IMP) + 0, 8'd12);
    check(rch_ibias[3] == 8'd57 && rch_imp[31] == 8'd200 && bch_ibias[4] == 8'd99
          && bch_imp[0] == 8'd12, "analog setting ports");
    csr_rd(int'(A_RCH_IBIAS) + 3, d); check(d == 8'd57, "serial read-back");
    csr_rd(int'(A_CTRL), d);          check(d == 8'h18, "CTRL reset value");

    // --- 32 simultaneous measurements: every channel at the same instant.
    burst('1, order);
    check(order.size() == NUM_CH, "all 32 simultaneous events delivered");
    for (int i = 1; i < order.size(); i++)
      check(order[i] == order[i-1] + 1, "simultaneous burst in round-robin order");
    m_all32++;

    // --- Fixed priority (round robin) mode.
    for (int b = 0; b < 12; b++) begin
      logic [NUM_CH-1:0] chans;
      int desc;
      chans = '0;
      for (int i = 0; i < 6; i++) chans[$urandom_range(0, NUM_CH - 1)] = 1'b1;
      burst(chans, order);
      check(order.size() == $countones(chans), "burst fully delivered");
      desc = 0;
      for (int i = 1; i < order.size(); i++) if (order[i] < order[i-1]) desc++;
      check(desc <= 1, "round-robin order");
      if (order.size() > 1) m_rr++;
    end

    // --- Dynamic priority mode: priorities 0..15 over channels 16..31.
    for (int c = 16; c < 32; c++) csr_wr(int'(A_RCH_PRIO) + c, 8'(c - 16));
    csr_wr(int'(A_CTRL), ctrl | 8'h01);
    for (int b = 0; b < 8; b++) begin
      logic [NUM_CH-1:0] chans;
      chans = '0;
      for (int i = 0; i < 6; i++) chans[$urandom_range(16, NUM_CH - 1)] = 1'b1;
      burst(chans, order);
      check(order.size() == $countones(chans), "burst fully delivered");
      // All arrive in the same cycle, after at most one frame in flight:
      // from the second frame on, strictly decreasing priority.
      for (int i = 2; i < order.size(); i++)
        check(order[i] < order[i-1], "dynamic priority order");
      if (order.size() > 2) m_dyn++;
    end
    csr_wr(int'(A_CTRL), ctrl & ~8'h01);

    // --- Diagnostic injection: hit patterns and configuration every 8 frames.
    csr_wr(int'(A_INTERVAL), 8'd8);
    csr_wr(int'(A_CTRL), ctrl | 8'h06);
    for (int b = 0; b < 10; b++) begin
      int c;
      after_edges(40);
      c = $urandom_range(0, NUM_CH - 1);
      fire(c, rand_off(), 1'b1);
    end
    after_edges(400);

    // --- Channel mask: channel 6 off, its events are ignored.
    csr_wr(int'(A_CHMASK), 8'hBF);
    after_edges(1);
    fire(6, rand_off(), 1'b1);
    after_edges(100);
    check(got[6] == 0 || exp_q[6].size() == 0, "masked channel silent");
    m_mask++;
    csr_wr(int'(A_CHMASK), 8'hFF);
    csr_wr(int'(A_CTRL), ctrl & ~8'h06);
    after_edges(100);

    // --- An event while the channel is still measuring is ignored.
    after_edges(1);
    fire(5, rand_off(), 1'b1);
    after_edges(4);
    fire(5, rand_off(), 1'b0);
    fired[5]--;              // never reaches the readout
    m_busy++;
    after_edges(100);

    // --- Overflow: every channel fires every 12 cycles for 20 rounds,
    // far more than one frame per 16 cycles can carry.
    for (int r = 0; r < 20; r++) begin
      int off;
      off = rand_off();
      for (int c = 0; c < NUM_CH; c++) fire(c, off, 1'b1);
      after_edges(12);
    end
    after_edges(16 * 32 * 5 + 200);

    // --- Drop and event counters, through the serial interface.
    for (int c = 0; c < NUM_CH; c++) begin
      int drops;
      drops = skipped[c] + exp_q[c].size();
      csr_rd(int'(A_ST_DROP) + c, d);
      check(int'(d) == drops, $sformatf("ch%0d dropped %0d expected %0d", c, d, drops));
      if (drops > 0) m_drop++;
      csr_rd(int'(A_ST_EVT) + c, d);
      check(int'(d) == fired[c] % 256, $sformatf("ch%0d events %0d expected %0d", c, d, fired[c]));
    end

    // Every mechanism must have happened.
    check(m_ts > 200,      "timestamps delivered");
    check(m_rr > 0,        "round robin exercised");
    check(m_dyn > 0,       "dynamic priority exercised");
    check(m_switch >= 2,   "mode switched");
    check(m_hit > 0,       "hit patterns injected");
    check(m_cfg > 0,       "configuration injected");
    check(m_parity > 0,    "parity checked");
    check(m_drop > 0,      "FIFO overflow");
    check(m_rollover > 0,  "coarse rollover in timestamps");
    check(m_cclk > 0,      "counter clock rollover marks");
    check(m_rearm > 0,     "channel re-armed");
    check(m_mask > 0,      "channel mask");
    check(m_busy > 0,      "busy event");
    check(m_csr_rd > 0,    "serial reads");
    check(m_all32 > 0,     "32 simultaneous measurements");
    $display("mechanisms: ts=%0d rr=%0d dyn=%0d switch=%0d hit=%0d cfg=%0d parity=%0d drop=%0d rollover=%0d cclk=%0d rearm=%0d mask=%0d busy=%0d csr_rd=%0d all32=%0d",
             m_ts, m_rr, m_dyn, m_switch, m_hit, m_cfg, m_parity, m_drop, m_rollover,
             m_cclk, m_rearm, m_mask, m_busy, m_csr_rd, m_all32);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
