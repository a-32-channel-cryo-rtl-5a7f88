// prog_interface: low-speed serial programming interface to the registers.
//
// A four-wire serial slave. A transaction is framed by gppi_sel high and
// carries 24 bits on gppi_sdi, sampled on rising edges of gppi_clk, MSB
// first: a write flag (1 = write, 0 = read), a 15-bit byte address (the
// low CSR_AW bits are used) and 8 data bits. A write is issued after the
// 24th bit. A read is issued after the 16th bit; the register byte is then
// shifted out on gppi_sdo MSB first, changing after falling edges of
// gppi_clk, so the master samples it on the rising edges of bits 17 to 24
// (the data bits it sends meanwhile are ignored). gppi_sdo is low outside
// the data phase.
// The serial lines are not clocked by gppi_clk inside the chip: they are
// resynchronised with two flops each into the i_clk domain and their edges
// detected there, so i_clk must run at least 16 times faster than gppi_clk.
// The document names the interface and its pins only; the protocol is this
// design's choice.
`timescale 1ps/1fs
module prog_interface #(
  parameter int unsigned AW = snspd_pkg::CSR_AW
) (
  input  logic          i_clk,
  input  logic          i_rst_n,
  input  logic          gppi_clk,
  input  logic          gppi_sel,
  input  logic          gppi_sdi,
  output logic          gppi_sdo,
  // register bus
  output logic [AW-1:0] o_addr,
  output logic [7:0]    o_wdata,
  output logic          o_we,
  output logic          o_re,
  input  logic [7:0]    i_rdata,
  input  logic          i_rvalid
);

  logic [1:0]  clk_s, sel_s, sdi_s;
  logic        clk_q;
  logic        rise, fall, sel;
  logic [14:0] shreg;   // the last 15 bits received
  logic [4:0]  bitcnt;
  logic        rw;
  logic [7:0]  dout;

  assign sel  = sel_s[1];
  assign rise = clk_s[1] & ~clk_q;
  assign fall = ~clk_s[1] & clk_q;

  always_ff @(posedge i_clk or negedge i_rst_n)
    if (!i_rst_n) begin
      clk_s    <= '0;
      sel_s    <= '0;
      sdi_s    <= '0;
      clk_q    <= 1'b0;
      shreg    <= '0;
      bitcnt   <= '0;
      rw       <= 1'b0;
      dout     <= '0;
      o_addr   <= '0;
      o_wdata  <= '0;
      o_we     <= 1'b0;
      o_re     <= 1'b0;
      gppi_sdo <= 1'b0;
    end else begin
      clk_s <= {clk_s[0], gppi_clk};
      sel_s <= {sel_s[0], gppi_sel};
      sdi_s <= {sdi_s[0], gppi_sdi};
      clk_q <= clk_s[1];
      o_we  <= 1'b0;
      o_re  <= 1'b0;
      if (!sel) begin
        bitcnt <= '0;
        dout   <= '0;
      end else begin
        if (rise && bitcnt < 5'd24) begin
          shreg  <= {shreg[13:0], sdi_s[1]};
          bitcnt <= bitcnt + 5'd1;
          if (bitcnt == 5'd15) begin
            rw     <= shreg[14];
            o_addr <= AW'({shreg[13:0], sdi_s[1]});
            o_re   <= ~shreg[14];
          end
          if (bitcnt == 5'd23 && rw) begin
            o_wdata <= {shreg[6:0], sdi_s[1]};
            o_we    <= 1'b1;
          end
        end
        if (i_rvalid)
          dout <= i_rdata;
        else if (fall && bitcnt >= 5'd17)
          dout <= {dout[6:0], 1'b0};
      end
      gppi_sdo <= sel & ~rw & (bitcnt >= 5'd16) & dout[7];
    end

endmodule
