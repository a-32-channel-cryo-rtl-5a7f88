// readout_subsystem: timestamp buffering, channel arbitration and packet
// assembly for the serial output.
//
// Each channel's merged timestamps {count, dout} enter a small FIFO of
// DEPTH entries; a timestamp that finds its FIFO full is dropped and counted
// in a saturating per-channel drop counter. Events of channels cleared in
// the channel mask are ignored. Whenever the serializer takes a frame
// (i_frame_load high for one cycle, the frame o_frame is taken on that clock
// edge) the subsystem moves on to the next one, chosen in this order:
//   1. a pending hit-pattern frame: one bit per channel that produced a
//      timestamp since the previous hit-pattern frame;
//   2. a pending configuration frame: CTRL byte, injection interval and
//      channel mask;
//   3. a timestamp frame of the channel granted by the arbiter;
//   4. an idle frame.
// Hit-pattern and configuration frames are requested every i_cfg.interval
// frames when enabled (interval 0 disables them). Bit 0 of every frame is an
// even parity bit over the rest when parity is enabled.
// Arbitration (selected by i_cfg.mode):
//   * fixed priority mode: round robin, starting after the channel served
//     last;
//   * dynamic priority mode: the channel with the highest i_prio value is
//     served first, the lower channel number among equals.
// The two modes, the diagnostic contents and the parity follow the
// document; the FIFO depth, the frame layout (see snspd_pkg), the order
// above and the injection interval are this design's choices.
// Timing: o_frame is combinational from the registered state; a timestamp
// written in cycle t can leave in the frame taken at t+1 at the earliest.
`timescale 1ps/1fs
module readout_subsystem
  import snspd_pkg::*;
#(
  parameter int unsigned NCH   = NUM_CH,
  parameter int unsigned CW    = COARSE_BITS,
  parameter int unsigned FW    = FINE_BITS,
  parameter int unsigned DEPTH = 4,
  parameter int unsigned PW    = PRIO_BITS
) (
  input  logic                    i_hsclk,
  input  logic                    i_rst_n,
  input  readout_cfg_t            i_cfg,
  input  logic [NCH-1:0][PW-1:0]  i_prio,
  input  logic [NCH-1:0][CW-1:0]  i_count,
  input  logic [NCH-1:0][FW-1:0]  i_dout,
  input  logic [NCH-1:0]          i_valid,
  input  logic                    i_frame_load,
  output frame_t                  o_frame,
  output logic [NCH-1:0][7:0]     o_drop_cnt,
  output logic [NCH-1:0][7:0]     o_evt_cnt
);

  localparam int unsigned TW  = CW + FW;
  localparam int unsigned AW  = (DEPTH > 1) ? $clog2(DEPTH) : 1;
  localparam int unsigned CBW = $clog2(NCH);

  // ------------------------------------------------------------- FIFOs
  logic [NCH-1:0][DEPTH-1:0][TW-1:0] fifo;
  logic [NCH-1:0][AW-1:0]            wr_ptr, rd_ptr;
  logic [NCH-1:0][AW:0]              level;
  logic [NCH-1:0]                    req, pop, push;

  // --------------------------------------------------------- arbitration
  logic [CBW-1:0] rr_last;
  logic [CBW-1:0] grant;
  logic           grant_vld;

  always_comb begin
    grant     = '0;
    grant_vld = 1'b0;
    if (i_cfg.mode == ARB_DYNAMIC) begin
      // Highest priority wins; scanning downwards makes the lowest
      // channel win among equals.
      for (int c = NCH - 1; c >= 0; c--)
        if (req[c] && (!grant_vld || i_prio[c] >= i_prio[grant])) begin
          grant     = CBW'(c);
          grant_vld = 1'b1;
        end
    end else begin
      // Scanning from the farthest candidate back to the nearest one
      // leaves the first requester after rr_last granted.
      for (int k = NCH; k >= 1; k--)
        if (req[(int'(rr_last) + k) % NCH]) begin
          grant     = CBW'((int'(rr_last) + k) % NCH);
          grant_vld = 1'b1;
        end
    end
  end

  // ------------------------------------------------------ injection state
  logic [7:0]     frame_ctr;
  logic           hit_pend, cfg_pend;
  logic [NCH-1:0] hit_acc;
  logic           inj_tick;

  assign inj_tick = i_frame_load && (i_cfg.interval != 8'd0) &&
                    (frame_ctr + 8'd1 >= i_cfg.interval);

  // --------------------------------------------------------- frame build
  typedef enum logic [1:0] {SEL_IDLE, SEL_HIT, SEL_CFG, SEL_TS} sel_e;
  sel_e   sel;
  frame_t body;

  always_comb begin
    if (hit_pend)       sel = SEL_HIT;
    else if (cfg_pend)  sel = SEL_CFG;
    else if (grant_vld) sel = SEL_TS;
    else                sel = SEL_IDLE;

    body = '0;
    unique case (sel)
      SEL_HIT: begin
        body[63:62] = FT_HITPAT;
        body[61 -: NCH] = hit_acc;
      end
      SEL_CFG: begin
        body[63:62] = FT_CONFIG;
        body[61:54] = i_cfg.ctrl_byte;
        body[53:46] = i_cfg.interval;
        body[45 -: NCH] = i_cfg.ch_mask;
      end
      SEL_TS: begin
        body[63:62] = FT_TSTAMP;
        body[61 -: CBW] = grant;
        body[61-CBW -: TW] = fifo[grant][rd_ptr[grant]];
      end
      default: body[63:62] = FT_IDLE;
    endcase
    o_frame    = body;
    o_frame[0] = i_cfg.parity_en ? frame_parity(body) : 1'b0;
  end

  // ------------------------------------------------------- FIFO control
  always_comb
    for (int c = 0; c < NCH; c++) begin
      req[c]  = (level[c] != '0);
      pop[c]  = i_frame_load && (sel == SEL_TS) && (grant == CBW'(c));
      push[c] = i_valid[c] && i_cfg.ch_mask[c];
    end

  always_ff @(posedge i_hsclk or negedge i_rst_n)
    if (!i_rst_n) begin
      fifo       <= '0;
      wr_ptr     <= '0;
      rd_ptr     <= '0;
      level      <= '0;
      o_drop_cnt <= '0;
      o_evt_cnt  <= '0;
    end else begin
      for (int c = 0; c < NCH; c++) begin
        logic do_push;
        do_push = push[c] && (level[c] < (AW+1)'(DEPTH) || pop[c]);
        if (push[c]) o_evt_cnt[c] <= o_evt_cnt[c] + 8'd1;
        if (push[c] && !do_push && o_drop_cnt[c] != 8'hFF)
          o_drop_cnt[c] <= o_drop_cnt[c] + 8'd1;
        if (do_push) begin
          fifo[c][wr_ptr[c]] <= {i_count[c], i_dout[c]};
          wr_ptr[c] <= (wr_ptr[c] == AW'(DEPTH - 1)) ? '0 : wr_ptr[c] + 1'b1;
        end
        if (pop[c])
          rd_ptr[c] <= (rd_ptr[c] == AW'(DEPTH - 1)) ? '0 : rd_ptr[c] + 1'b1;
        level[c] <= level[c] + (AW+1)'(do_push) - (AW+1)'(pop[c]);
      end
    end

  always_ff @(posedge i_hsclk or negedge i_rst_n)
    if (!i_rst_n) begin
      rr_last   <= CBW'(NCH - 1);
      frame_ctr <= '0;
      hit_pend  <= 1'b0;
      cfg_pend  <= 1'b0;
      hit_acc   <= '0;
    end else begin
      if (i_frame_load && sel == SEL_TS) rr_last <= grant;
      if (i_frame_load) frame_ctr <= inj_tick ? 8'd0 : frame_ctr + 8'd1;
      // Accumulate hits; a hit-pattern frame taken now restarts the pattern.
      if (i_frame_load && sel == SEL_HIT) hit_acc <= push;
      else                                hit_acc <= hit_acc | push;
      if (i_frame_load && sel == SEL_HIT)      hit_pend <= 1'b0;
      else if (inj_tick && i_cfg.inj_hit)      hit_pend <= 1'b1;
      if (i_frame_load && sel == SEL_CFG)      cfg_pend <= 1'b0;
      else if (inj_tick && i_cfg.inj_cfg)      cfg_pend <= 1'b1;
    end

  // A channel is popped only when it has something to give.
  a_pop_nonempty: assert property (@(posedge i_hsclk) disable iff (!i_rst_n)
    (pop == '0) || ((pop & req) == pop));

endmodule
