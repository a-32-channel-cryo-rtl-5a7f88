// tb_csr_regs: checks reset values, write/read-back of random control and
// storage bytes across the whole 5120-byte space against a reference array,
// the decoded control fields, the read-only status window and the one-cycle
// read latency.
`timescale 1ps/1fs
module tb_csr_regs;
  import snspd_pkg::*;
  logic clk = 1'b0, rst_n = 1'b0;
  logic [CSR_AW-1:0] addr = '0;
  logic [7:0] wdata = '0, rdata;
  logic we = 1'b0, re = 1'b0, rvalid;
  logic [NUM_CH-1:0][7:0] drop_cnt, evt_cnt;
  readout_cfg_t cfg;
  logic [NUM_CH-1:0][PRIO_BITS-1:0] prio;
  logic [NUM_CH-1:0][7:0] rch_ibias, rch_imp;
  logic [NUM_BIAS-1:0][7:0] bch_ibias, bch_imp;
  int checks = 0, failures = 0;
  logic [7:0] ref_mem [CSR_BYTES];

  always #500 clk = ~clk;

  csr_regs dut (
    .i_clk(clk), .i_rst_n(rst_n), .i_addr(addr), .i_wdata(wdata), .i_we(we),
    .i_re(re), .o_rdata(rdata), .o_rvalid(rvalid), .i_drop_cnt(drop_cnt),
    .i_evt_cnt(evt_cnt), .o_cfg(cfg), .o_prio(prio), .o_rch_ibias(rch_ibias),
    .o_rch_imp(rch_imp), .o_bch_ibias(bch_ibias), .o_bch_imp(bch_imp));

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s at %0t", what, $time);
    end
  endtask

  task automatic wr(input int a, input logic [7:0] d);
    @(negedge clk);
    addr = CSR_AW'(a); wdata = d; we = 1'b1;
    @(negedge clk);
    we = 1'b0;
  endtask

  task automatic rd(input int a, output logic [7:0] d);
    @(negedge clk);
    addr = CSR_AW'(a); re = 1'b1;
    @(negedge clk);
    re = 1'b0;
    check(rvalid == 1'b1, "rvalid one cycle after read");
    d = rdata;
    @(negedge clk);
    check(rvalid == 1'b0, "rvalid single pulse");
  endtask

  function automatic bit is_status(input int a);
    return a >= 'h800 && a < 'h840;
  endfunction

  initial begin
    #100000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [7:0] d;
    for (int c = 0; c < NUM_CH; c++) begin
      drop_cnt[c] = 8'(c + 100);
      evt_cnt[c]  = 8'(3 * c + 1);
    end
    for (int a = 0; a < CSR_BYTES; a++) ref_mem[a] = 8'h00;
    ref_mem['h000] = 8'h18;
    for (int a = 4; a < 8; a++) ref_mem[a] = 8'hFF;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    // Reset values.
    check(cfg.ch_mask == '1 && cfg.parity_en && cfg.cclk_en && cfg.mode == ARB_FIXED
          && !cfg.inj_hit && !cfg.inj_cfg && cfg.interval == 8'd0, "reset fields");
    rd('h000, d); check(d == 8'h18, "CTRL reset");
    // Random writes over the whole space, then read back.
    for (int t = 0; t < 600; t++) begin
      int a;
      logic [7:0] v;
      a = (t < 300) ? $urandom_range(0, 'h1FF) : $urandom_range(0, CSR_BYTES - 1);
      v = 8'($urandom);
      wr(a, v);
      if (!is_status(a)) ref_mem[a] = v;
    end
    for (int a = 0; a < CSR_BYTES; a += 7) begin
      rd(a, d);
      if (a >= 'h800 && a < 'h820)      check(d == 8'(a - 'h800 + 100), "drop status");
      else if (a >= 'h820 && a < 'h840) check(d == 8'(3 * (a - 'h820) + 1), "event status");
      else                              check(d == ref_mem[a], $sformatf("read back %0h", a));
    end
    // Decoded fields against the reference array.
    wr('h000, 8'h07); ref_mem[0] = 8'h07;
    wr('h001, 8'd9);  ref_mem[1] = 8'd9;
    check(cfg.mode == ARB_DYNAMIC && cfg.inj_hit && cfg.inj_cfg && !cfg.parity_en
          && !cfg.cclk_en && cfg.interval == 8'd9 && cfg.ctrl_byte == 8'h07, "ctrl fields");
    check(cfg.ch_mask == {ref_mem[7], ref_mem[6], ref_mem[5], ref_mem[4]}, "mask field");
    for (int c = 0; c < NUM_CH; c++) begin
      check(rch_ibias[c] == ref_mem['h100 + c], "readout bias code");
      check(rch_imp[c]   == ref_mem['h120 + c], "readout impedance code");
      check(prio[c]      == ref_mem['h140 + c][PRIO_BITS-1:0], "priority");
    end
    for (int b = 0; b < NUM_BIAS; b++) begin
      check(bch_ibias[b] == ref_mem['h160 + b], "bias channel code");
      check(bch_imp[b]   == ref_mem['h168 + b], "bias impedance code");
    end
    // Status is read only.
    wr('h805, 8'h00);
    rd('h805, d); check(d == 8'd105, "status not writable");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
