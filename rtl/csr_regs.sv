// csr_regs: the chip's status and control registers (about 5 KB).
//
// CSR_BYTES byte-wide registers with a 13-bit byte address. Control bytes
// are plain read/write storage; the fields the rest of the chip uses are
// decoded from fixed addresses (map in snspd_pkg): readout control byte,
// injection interval, 32-bit channel mask, per readout channel the bias
// current code, quench impedance code and arbitration priority, per bias
// channel the bias current and impedance codes. Addresses A_STATUS up to
// A_ST_END read the per-channel dropped-event and event counters of the
// readout and ignore writes. All other bytes are general-purpose storage.
// Bus: i_we writes i_wdata at i_addr on the clock edge; i_re returns the
// byte at i_addr on o_rdata with o_rvalid one cycle later.
// The size (about 5 kilobytes) and the existence of status and control
// registers follow the document; the map, widths and reset values are this
// design's choices. Reset: everything zero except CTRL (parity and counter
// clock on, round robin) and the channel mask (all channels on).
`timescale 1ps/1fs
module csr_regs
  import snspd_pkg::*;
#(
  parameter int unsigned BYTES = CSR_BYTES,
  parameter int unsigned AW    = CSR_AW
) (
  input  logic                         i_clk,
  input  logic                         i_rst_n,
  input  logic [AW-1:0]                i_addr,
  input  logic [7:0]                   i_wdata,
  input  logic                         i_we,
  input  logic                         i_re,
  output logic [7:0]                   o_rdata,
  output logic                         o_rvalid,
  // status inputs
  input  logic [NUM_CH-1:0][7:0]       i_drop_cnt,
  input  logic [NUM_CH-1:0][7:0]       i_evt_cnt,
  // decoded control outputs
  output readout_cfg_t                 o_cfg,
  output logic [NUM_CH-1:0][PRIO_BITS-1:0] o_prio,
  output logic [NUM_CH-1:0][7:0]       o_rch_ibias,
  output logic [NUM_CH-1:0][7:0]       o_rch_imp,
  output logic [NUM_BIAS-1:0][7:0]     o_bch_ibias,
  output logic [NUM_BIAS-1:0][7:0]     o_bch_imp
);

  localparam logic [7:0] CTRL_RESET = 8'h18;  // parity on, counter clock on

  logic [7:0] mem [BYTES];

  function automatic logic [7:0] reset_value(input int unsigned a);
    if (a == int'(A_CTRL))                            return CTRL_RESET;
    if (a >= int'(A_CHMASK) && a < int'(A_CHMASK) + 4) return 8'hFF;
    return 8'h00;
  endfunction

  function automatic logic is_status(input logic [AW-1:0] a);
    return (a >= A_STATUS) && (a < A_ST_END);
  endfunction

  always_ff @(posedge i_clk or negedge i_rst_n)
    if (!i_rst_n) begin
      for (int a = 0; a < int'(BYTES); a++) mem[a] <= reset_value(a);
    end else if (i_we && !is_status(i_addr) && int'(i_addr) < int'(BYTES)) begin
      mem[i_addr] <= i_wdata;
    end

  always_ff @(posedge i_clk or negedge i_rst_n)
    if (!i_rst_n) begin
      o_rdata  <= '0;
      o_rvalid <= 1'b0;
    end else begin
      o_rvalid <= i_re;
      if (i_re) begin
        if (i_addr >= A_ST_DROP && i_addr < A_ST_EVT)
          o_rdata <= i_drop_cnt[i_addr - A_ST_DROP];
        else if (i_addr >= A_ST_EVT && i_addr < A_ST_END)
          o_rdata <= i_evt_cnt[i_addr - A_ST_EVT];
        else if (int'(i_addr) < int'(BYTES))
          o_rdata <= mem[i_addr];
        else
          o_rdata <= 8'h00;
      end
    end

  // Decoded fields.
  always_comb begin
    o_cfg.ctrl_byte = mem[A_CTRL];
    o_cfg.mode      = arb_mode_e'(mem[A_CTRL][CTRL_MODE]);
    o_cfg.inj_hit   = mem[A_CTRL][CTRL_INJHIT];
    o_cfg.inj_cfg   = mem[A_CTRL][CTRL_INJCFG];
    o_cfg.parity_en = mem[A_CTRL][CTRL_PARITY];
    o_cfg.cclk_en   = mem[A_CTRL][CTRL_CCLKEN];
    o_cfg.interval  = mem[A_INTERVAL];
    for (int b = 0; b < 4; b++)
      o_cfg.ch_mask[b*8 +: 8] = mem[A_CHMASK + AW'(b)];
    for (int c = 0; c < int'(NUM_CH); c++) begin
      o_rch_ibias[c] = mem[A_RCH_IBIAS + AW'(c)];
      o_rch_imp[c]   = mem[A_RCH_IMP + AW'(c)];
      o_prio[c]      = mem[A_RCH_PRIO + AW'(c)][PRIO_BITS-1:0];
    end
    for (int b = 0; b < int'(NUM_BIAS); b++) begin
      o_bch_ibias[b] = mem[A_BCH_IBIAS + AW'(b)];
      o_bch_imp[b]   = mem[A_BCH_IMP + AW'(b)];
    end
  end

endmodule
