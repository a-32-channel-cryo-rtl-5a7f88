// tb_prog_interface: a serial master in the testbench sends 24-bit write and
// read transactions (write flag, 15-bit address, 8 data bits, MSB first) with
// gppi_clk at 1/32 of the core clock. A reference register array answers the
// interface's bus reads one cycle later. Checks: each write reaches the bus
// once with the right address and data, each read issues one bus read of the
// right address and the byte comes back on gppi_sdo, and a transaction cut
// short by gppi_sel falling has no effect.
`timescale 1ps/1fs
module tb_prog_interface;
  import snspd_pkg::*;
  logic clk = 1'b0, rst_n = 1'b0;
  logic sclk = 1'b0, sel = 1'b0, sdi = 1'b0, sdo;
  logic [CSR_AW-1:0] addr;
  logic [7:0] wdata, rdata = '0;
  logic we, re, rvalid = 1'b0;
  int checks = 0, failures = 0;
  logic [7:0] regs [1 << CSR_AW];
  int n_we = 0, n_re = 0;
  localparam int HALF = 16;   // core cycles per half gppi_clk period

  always #500 clk = ~clk;

  prog_interface dut (
    .i_clk(clk), .i_rst_n(rst_n), .gppi_clk(sclk), .gppi_sel(sel),
    .gppi_sdi(sdi), .gppi_sdo(sdo), .o_addr(addr), .o_wdata(wdata),
    .o_we(we), .o_re(re), .i_rdata(rdata), .i_rvalid(rvalid));

  // Register array on the bus side.
  always @(posedge clk) begin
    rvalid <= re;
    if (re) rdata <= regs[addr];
    if (we) begin
      regs[addr] <= wdata;
      n_we++;
    end
    if (re) n_re++;
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s at %0t", what, $time);
    end
  endtask

  // One transaction; returns what was seen on gppi_sdo during the data bits.
  task automatic xfer(input bit w, input int a, input logic [7:0] d,
                      input int nbits, output logic [7:0] rd);
    logic [23:0] word;
    word = {w, 15'(a), d};
    rd = '0;
    sel = 1'b1;
    repeat (HALF) @(negedge clk);
    for (int i = 23; i >= 24 - nbits; i--) begin
      sdi = word[i];
      repeat (HALF) @(negedge clk);
      sclk = 1'b1;
      if (i < 8) rd[i] = sdo;    // master samples on the rising edge
      repeat (HALF) @(negedge clk);
      sclk = 1'b0;
    end
    repeat (HALF) @(negedge clk);
    sel = 1'b0;
    repeat (2 * HALF) @(negedge clk);
  endtask

  initial begin
    #500000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [7:0] got;
    int a, w0, r0;
    logic [7:0] v;
    for (int i = 0; i < (1 << CSR_AW); i++) regs[i] = 8'(i * 5 + 3);
    repeat (4) @(negedge clk);
    rst_n = 1'b1;
    repeat (4) @(negedge clk);
    for (int t = 0; t < 40; t++) begin
      a = $urandom_range(0, (1 << CSR_AW) - 1);
      v = 8'($urandom);
      w0 = n_we;
      xfer(1'b1, a, v, 24, got);
      check(n_we == w0 + 1, "one bus write");
      check(regs[a] == v, $sformatf("write %0h", a));
      r0 = n_re;
      xfer(1'b0, a, 8'h00, 24, got);
      check(n_re == r0 + 1, "one bus read");
      check(got == v, $sformatf("read %0h got %0h exp %0h", a, got, v));
      // Read of an untouched address.
      a = $urandom_range(0, (1 << CSR_AW) - 1);
      xfer(1'b0, a, 8'h00, 24, got);
      check(got == regs[a], "read back");
    end
    // Aborted write: only 20 bits before select falls.
    w0 = n_we;
    xfer(1'b1, 'h123, 8'hAA, 20, got);
    check(n_we == w0, "aborted write ignored");
    check(sdo == 1'b0, "sdo idle");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
