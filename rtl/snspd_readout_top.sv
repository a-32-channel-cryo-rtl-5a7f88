// snspd_readout_top: digital core of the 32-channel SNSPD readout ASIC.
//
// Each readout channel's fine TDC (a Vernier delay line model plus its
// tdc_logic) measures the interval from a detector event to the next rising
// edge of the high-speed clock i_hsclk in 5 ps steps. The tdc_aggregator
// owns the shared 8-bit coarse counter and pairs each fine code with the
// coarse count of that clock edge. The readout_subsystem buffers the
// timestamps, arbitrates between channels (round robin or programmable
// priority), adds hit-pattern, configuration and parity information and
// hands 64-bit frames to the hsio_driver, which sends them on four
// differential lanes at one bit per clock. The clock_controller derives the
// counter clock, which rises at every coarse rollover and is brought out on
// gppi_cclk. The registers (csr_regs) are written and read through the
// serial programming interface (prog_interface) on the gppi_* pins.
//
// Ports: i_event are the discriminated outputs of the analog front ends
// (one per readout channel); i_hsclk comes from the on-chip PLL, which is
// not modelled; the bias and impedance codes go to the analog readout and
// bias channels. Everything runs on i_hsclk (1.0 GHz), reset i_rst_n is
// asynchronous and active low.
// The blocks and their connections follow the architecture diagram of the
// document; the single clock domain, the frame format, the register map and
// the serial protocol are this design's own choices.
`timescale 1ps/1fs
module snspd_readout_top
  import snspd_pkg::*;
(
  input  logic                          i_hsclk,
  input  logic                          i_rst_n,
  input  logic [NUM_CH-1:0]             i_event,
  // programming interface pins
  input  logic                          gppi_clk,
  input  logic                          gppi_sel,
  input  logic                          gppi_sdi,
  output logic                          gppi_sdo,
  output logic                          gppi_cclk,
  // high-speed serial outputs
  output logic [NUM_LANES-1:0]          sdata_p,
  output logic [NUM_LANES-1:0]          sdata_m,
  // settings of the analog channels
  output logic [NUM_CH-1:0][7:0]        o_rch_ibias,
  output logic [NUM_CH-1:0][7:0]        o_rch_imp,
  output logic [NUM_BIAS-1:0][7:0]      o_bch_ibias,
  output logic [NUM_BIAS-1:0][7:0]      o_bch_imp
);

  // ---------------------------------------------------- fine TDC channels
  logic [NUM_CH-1:0]                  start, stop, done, sample, fvalid;
  logic [NUM_CH-1:0][FINE_STAGES-1:0] therm;
  logic [NUM_CH-1:0][FINE_BITS-1:0]   fdout;

  for (genvar c = 0; c < NUM_CH; c++) begin : g_ch
    vernier_delay_line u_line (
      .i_start      (start[c]),
      .i_stop       (stop[c]),
      .o_therm_code (therm[c]),
      .o_delay_done (done[c])
    );
    tdc_logic u_tdc (
      .i_hsclk            (i_hsclk),
      .i_rst_n            (i_rst_n),
      .i_event            (i_event[c]),
      .o_start            (start[c]),
      .o_stop             (stop[c]),
      .i_delay_therm_code (therm[c]),
      .i_delay_done       (done[c]),
      .o_sample           (sample[c]),
      .o_dout             (fdout[c]),
      .o_dout_valid       (fvalid[c])
    );
  end

  // ----------------------------------------------------- clock controller
  readout_cfg_t cfg;
  logic         cclk;

  clock_controller u_clkctl (
    .i_hsclk   (i_hsclk),
    .i_rst_n   (i_rst_n),
    .i_cclk_en (cfg.cclk_en),
    .o_cclk    (cclk)
  );
  assign gppi_cclk = cclk;

  // ----------------------------------------------------------- aggregator
  logic [NUM_CH-1:0][COARSE_BITS-1:0] acount;
  logic [NUM_CH-1:0][FINE_BITS-1:0]   adout;
  logic [NUM_CH-1:0]                  avalid;

  tdc_aggregator u_agg (
    .i_hsclk  (i_hsclk),
    .i_rst_n  (i_rst_n),
    .i_cclk   (cclk),
    .i_sample (sample),
    .i_dout   (fdout),
    .i_valid  (fvalid),
    .o_count  (acount),
    .o_dout   (adout),
    .o_valid  (avalid),
    .o_coarse ()
  );

  // ------------------------------------------------------------- readout
  logic [NUM_CH-1:0][PRIO_BITS-1:0] prio;
  logic [NUM_CH-1:0][7:0]           drop_cnt, evt_cnt;
  frame_t                           frame;
  logic                             frame_load;

  readout_subsystem u_ro (
    .i_hsclk      (i_hsclk),
    .i_rst_n      (i_rst_n),
    .i_cfg        (cfg),
    .i_prio       (prio),
    .i_count      (acount),
    .i_dout       (adout),
    .i_valid      (avalid),
    .i_frame_load (frame_load),
    .o_frame      (frame),
    .o_drop_cnt   (drop_cnt),
    .o_evt_cnt    (evt_cnt)
  );

  hsio_driver u_hsio (
    .i_hsclk      (i_hsclk),
    .i_rst_n      (i_rst_n),
    .i_frame      (frame),
    .o_frame_load (frame_load),
    .sdata_p      (sdata_p),
    .sdata_m      (sdata_m)
  );

  // ----------------------------------------------- registers and access
  logic [CSR_AW-1:0] bus_addr;
  logic [7:0]        bus_wdata, bus_rdata;
  logic              bus_we, bus_re, bus_rvalid;

  prog_interface u_prog (
    .i_clk    (i_hsclk),
    .i_rst_n  (i_rst_n),
    .gppi_clk (gppi_clk),
    .gppi_sel (gppi_sel),
    .gppi_sdi (gppi_sdi),
    .gppi_sdo (gppi_sdo),
    .o_addr   (bus_addr),
    .o_wdata  (bus_wdata),
    .o_we     (bus_we),
    .o_re     (bus_re),
    .i_rdata  (bus_rdata),
    .i_rvalid (bus_rvalid)
  );

  csr_regs u_csr (
    .i_clk       (i_hsclk),
    .i_rst_n     (i_rst_n),
    .i_addr      (bus_addr),
    .i_wdata     (bus_wdata),
    .i_we        (bus_we),
    .i_re        (bus_re),
    .o_rdata     (bus_rdata),
    .o_rvalid    (bus_rvalid),
    .i_drop_cnt  (drop_cnt),
    .i_evt_cnt   (evt_cnt),
    .o_cfg       (cfg),
    .o_prio      (prio),
    .o_rch_ibias (o_rch_ibias),
    .o_rch_imp   (o_rch_imp),
    .o_bch_ibias (o_bch_ibias),
    .o_bch_imp   (o_bch_imp)
  );

endmodule
