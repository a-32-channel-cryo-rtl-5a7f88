// snspd_pkg: constants and types shared by the SNSPD readout core.
//
// The channel counts (32 readout channels, 5 bias channels, 4 serial lanes)
// and the 5 ps fine-TDC step follow the published architecture. The 8-bit
// coarse counter width follows the counter values 0xFE, 0xFF, 0x00 shown in
// the timing diagram of the time-tagging scheme. Everything else here (the
// high-speed clock period, the 64-bit output frame, the register map) is
// this design's own choice and is documented next to each constant.
`timescale 1ps/1fs
package snspd_pkg;

  // ---------------------------------------------------------------- sizes
  localparam int unsigned NUM_CH      = 32;  // readout channels with TDC
  localparam int unsigned NUM_BIAS    = 5;   // bias-only channels
  localparam int unsigned NUM_LANES   = 4;   // high-speed serial lanes
  localparam int unsigned COARSE_BITS = 8;   // shared coarse counter
  localparam int unsigned CH_BITS     = $clog2(NUM_CH);

  // Fine TDC: 5 ps step. The high-speed clock is taken as 1.0 GHz (the rate
  // of the serial lanes), so one clock period spans 200 Vernier stages.
  localparam int unsigned HSCLK_PERIOD_PS = 1000;
  localparam int unsigned FINE_LSB_PS     = 5;
  localparam int unsigned FINE_STAGES     = HSCLK_PERIOD_PS / FINE_LSB_PS;
  localparam int unsigned FINE_BITS       = $clog2(FINE_STAGES + 1);

  localparam int unsigned TS_BITS = COARSE_BITS + FINE_BITS; // {coarse, fine}

  // ---------------------------------------------------------- output frame
  // One frame is 64 bits, 16 bits per lane, sent MSB first on all four lanes
  // in lockstep. Bits [63:62] carry the frame type, bit [0] an even parity
  // bit over [63:1] when parity is enabled.
  localparam int unsigned FRAME_BITS = 64;
  localparam int unsigned LANE_BITS  = FRAME_BITS / NUM_LANES;

  typedef enum logic [1:0] {
    FT_IDLE   = 2'b00,  // nothing to send
    FT_TSTAMP = 2'b01,  // [61:57] channel, [56:41] {coarse, fine}
    FT_HITPAT = 2'b10,  // [61:30] channels hit since the last such frame
    FT_CONFIG = 2'b11   // [61:54] CTRL, [53:46] interval, [45:14] channel mask
  } frame_type_e;

  typedef logic [FRAME_BITS-1:0] frame_t;

  // Readout arbitration modes.
  typedef enum logic {
    ARB_FIXED   = 1'b0,  // round robin
    ARB_DYNAMIC = 1'b1   // programmable per-channel priority
  } arb_mode_e;

  // ------------------------------------------------------------ registers
  // About 5 KB of byte-wide registers, 13-bit byte address.
  localparam int unsigned CSR_BYTES  = 5120;
  localparam int unsigned CSR_AW     = 13;
  localparam int unsigned PRIO_BITS  = 4;

  // Register map (byte addresses).
  localparam logic [CSR_AW-1:0] A_CTRL      = 13'h000; // see ctrl bits below
  localparam logic [CSR_AW-1:0] A_INTERVAL  = 13'h001; // frames between injections
  localparam logic [CSR_AW-1:0] A_CHMASK    = 13'h004; // 4 bytes, little endian
  localparam logic [CSR_AW-1:0] A_RCH_IBIAS = 13'h100; // 32 x bias current code
  localparam logic [CSR_AW-1:0] A_RCH_IMP   = 13'h120; // 32 x quench impedance code
  localparam logic [CSR_AW-1:0] A_RCH_PRIO  = 13'h140; // 32 x priority (low nibble)
  localparam logic [CSR_AW-1:0] A_BCH_IBIAS = 13'h160; // 5 x bias current code
  localparam logic [CSR_AW-1:0] A_BCH_IMP   = 13'h168; // 5 x impedance code
  localparam logic [CSR_AW-1:0] A_STATUS    = 13'h800; // status area, read only
  localparam logic [CSR_AW-1:0] A_ST_DROP   = 13'h800; // 32 x dropped-event count
  localparam logic [CSR_AW-1:0] A_ST_EVT    = 13'h820; // 32 x event count (low byte)
  localparam logic [CSR_AW-1:0] A_ST_END    = 13'h840;

  // CTRL register bits
  localparam int unsigned CTRL_MODE   = 0; // 1: dynamic priority, 0: round robin
  localparam int unsigned CTRL_INJHIT = 1; // inject hit-pattern frames
  localparam int unsigned CTRL_INJCFG = 2; // inject configuration frames
  localparam int unsigned CTRL_PARITY = 3; // add the parity bit
  localparam int unsigned CTRL_CCLKEN = 4; // run the counter clock

  // Control fields decoded out of the register file.
  typedef struct packed {
    arb_mode_e              mode;
    logic                   inj_hit;
    logic                   inj_cfg;
    logic                   parity_en;
    logic                   cclk_en;
    logic [7:0]             ctrl_byte;
    logic [7:0]             interval;
    logic [NUM_CH-1:0]      ch_mask;
  } readout_cfg_t;

  // Even parity over frame bits [63:1].
  function automatic logic frame_parity(input frame_t f);
    return ^f[FRAME_BITS-1:1];
  endfunction

endpackage
