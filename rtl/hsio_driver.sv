// hsio_driver: four-lane serializer feeding the differential output pairs.
//
// A 64-bit frame is split into one 16-bit slice per lane (lane l carries
// frame bits [16l+15:16l]) and the four slices are shifted out MSB first, one
// bit per lane per clock, all lanes in lockstep. o_frame_load is high during
// the last bit of a frame; on that clock edge i_frame is taken and its first
// bits appear on the lanes in the following cycle, so frames follow each
// other without a gap, one frame every LANE_BITS cycles. Each lane drives a
// complementary pair sdata_p/sdata_m from flops.
// Four lanes at 1.0 GHz with differential outputs follow the document; the
// lane mapping, frame length and bit order are this design's choices, and
// the analog LVDS-compatible output stage is outside this model. After reset
// the lanes send an idle frame (all zero) first.
`timescale 1ps/1fs
module hsio_driver
  import snspd_pkg::*;
#(
  parameter int unsigned LANES = NUM_LANES,
  parameter int unsigned LBITS = LANE_BITS
) (
  input  logic                  i_hsclk,
  input  logic                  i_rst_n,
  input  logic [LANES*LBITS-1:0] i_frame,
  output logic                  o_frame_load,
  output logic [LANES-1:0]      sdata_p,
  output logic [LANES-1:0]      sdata_m
);

  localparam int unsigned BW = $clog2(LBITS);

  logic [LANES-1:0][LBITS-1:0] shreg;
  logic [BW-1:0]               bitcnt;

  assign o_frame_load = (bitcnt == BW'(LBITS - 1));

  always_ff @(posedge i_hsclk or negedge i_rst_n)
    if (!i_rst_n) begin
      shreg   <= '0;
      bitcnt  <= '0;
      sdata_p <= '0;
      sdata_m <= '1;
    end else begin
      bitcnt <= o_frame_load ? '0 : bitcnt + 1'b1;
      for (int l = 0; l < LANES; l++) begin
        sdata_p[l] <= shreg[l][LBITS-1];
        sdata_m[l] <= ~shreg[l][LBITS-1];
        shreg[l]   <= o_frame_load ? i_frame[l*LBITS +: LBITS]
                                   : {shreg[l][LBITS-2:0], 1'b0};
      end
    end

endmodule
