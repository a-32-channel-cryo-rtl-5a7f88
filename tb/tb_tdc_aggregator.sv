// tb_tdc_aggregator: all 32 channels report measurements at random times.
// For each one the testbench works out the coarse count of the clock edge at
// which the channel's stop signal rose, from its own cycle count, and checks
// the merged count, fine code and valid. The counter clock is first driven in
// step with the coarse rollover (256 cycles), then once out of step: the
// coarse counter must re-align to it.
`timescale 1ps/1fs
module tb_tdc_aggregator;
  import snspd_pkg::*;
  localparam int NCH = NUM_CH;
  localparam int CW  = COARSE_BITS;
  localparam int FW  = FINE_BITS;

  logic clk = 1'b0, rst_n = 1'b0, cclk = 1'b0;
  logic [NCH-1:0]         sample = '0, valid = '0;
  logic [NCH-1:0][FW-1:0] dout = '0;
  logic [NCH-1:0][CW-1:0] o_count;
  logic [NCH-1:0][FW-1:0] o_dout;
  logic [NCH-1:0]         o_valid;
  logic [CW-1:0]          coarse;
  int checks = 0, failures = 0;
  int n = 0;          // rising edges since reset release
  int m0 = 1;         // edge at which the counter was last set to 1
  int results = 0;

  always #500 clk = ~clk;
  always @(posedge clk) if (rst_n) n <= n + 1;

  tdc_aggregator dut (
    .i_hsclk(clk), .i_rst_n(rst_n), .i_cclk(cclk), .i_sample(sample),
    .i_dout(dout), .i_valid(valid), .o_count(o_count), .o_dout(o_dout),
    .o_valid(o_valid), .o_coarse(coarse));

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s at edge %0d", what, n);
    end
  endtask

  function automatic int exp_coarse(input int edge_n);
    return (edge_n - m0 + 1) % 256;
  endfunction

  initial begin
    #50000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int timer [NCH];
  int exp_cnt [NCH];
  int exp_dout [NCH];
  bit pend_chk [NCH];

  initial begin
    for (int c = 0; c < NCH; c++) begin
      timer[c] = -$urandom_range(1, 20);
      pend_chk[c] = 0;
    end
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    while (n < 3000) begin
      @(negedge clk);
      check(int'(coarse) == exp_coarse(n), "coarse counter");
      for (int c = 0; c < NCH; c++) begin
        if (pend_chk[c]) begin
          pend_chk[c] = 0;
          check(o_valid[c] == 1'b1, "valid forwarded");
          check(int'(o_count[c]) == exp_cnt[c], $sformatf("ch%0d count %0d exp %0d", c, o_count[c], exp_cnt[c]));
          check(int'(o_dout[c]) == exp_dout[c], "fine code forwarded");
          results++;
        end else begin
          check(o_valid[c] == 1'b0, "no spurious valid");
        end
        valid[c] = 1'b0;
        timer[c]++;
        if (timer[c] == 0) begin
          sample[c] = 1'b1;            // stop rose at edge n
          exp_cnt[c] = exp_coarse(n);
        end else if (timer[c] == 8) begin
          valid[c] = 1'b1;
          dout[c] = FW'($urandom_range(0, 200));
          exp_dout[c] = int'(dout[c]);
          pend_chk[c] = 1;
        end else if (timer[c] == 9) begin
          sample[c] = 1'b0;
          timer[c] = -$urandom_range(1, 30);
        end
      end
      // Counter clock: in step with the rollover, except one early pulse.
      if (n == 1700)                        begin cclk = 1'b1; m0 = n + 1; end
      else if (n > 1700 && (n - 1700) % 256 == 0) begin cclk = 1'b1; m0 = n + 1; end
      else if (n < 1700 && n % 256 == 0 && n > 0) begin cclk = 1'b1; m0 = n + 1; end
      else if ((n % 256) == 128 || n == 1828) cclk = 1'b0;
    end
    check(results > 1000, "enough measurements");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
