// tdc_aggregator: shared coarse TDC and merge of coarse and fine codes.
//
// The coarse TDC is a COARSE_BITS counter that advances on every rising
// edge of the high-speed clock. For each readout channel the aggregator
// watches i_sample (the channel's stop signal, which rises on the clock edge
// that ends the fine measurement); on its first cycle high the current
// coarse count, which is the count reached at that edge, is latched. When the
// channel later reports its fine code with i_valid, the aggregator passes
// count, fine code and valid on together, registered, one cycle later. The
// consolidated timestamp is the concatenation {o_count, o_dout}: the event
// happened o_dout fine steps before the clock edge at which the coarse
// counter reached o_count.
// The reduced-rate clock i_cclk rises when the counter rolls over; on its
// rising edge the counter is reloaded with the value it must have in step
// with i_cclk, which keeps the two aligned.
// Per-channel count/dout/valid outputs and the concatenation follow the
// document; edge detection of i_sample and the re-alignment are this
// design's choices.
`timescale 1ps/1fs
module tdc_aggregator
  import snspd_pkg::*;
#(
  parameter int unsigned NCH = NUM_CH,
  parameter int unsigned CW  = COARSE_BITS,
  parameter int unsigned FW  = FINE_BITS
) (
  input  logic                    i_hsclk,
  input  logic                    i_rst_n,
  input  logic                    i_cclk,
  input  logic [NCH-1:0]          i_sample,
  input  logic [NCH-1:0][FW-1:0]  i_dout,
  input  logic [NCH-1:0]          i_valid,
  output logic [NCH-1:0][CW-1:0]  o_count,
  output logic [NCH-1:0][FW-1:0]  o_dout,
  output logic [NCH-1:0]          o_valid,
  output logic [CW-1:0]           o_coarse
);

  logic                   cclk_q;
  logic [NCH-1:0]         sample_q;
  logic [NCH-1:0][CW-1:0] count_q;

  always_ff @(posedge i_hsclk or negedge i_rst_n)
    if (!i_rst_n) begin
      o_coarse <= '0;
      cclk_q   <= 1'b0;
      sample_q <= '0;
      count_q  <= '0;
      o_count  <= '0;
      o_dout   <= '0;
      o_valid  <= '0;
    end else begin
      cclk_q   <= i_cclk;
      o_coarse <= (i_cclk && !cclk_q) ? CW'(1) : o_coarse + 1'b1;
      sample_q <= i_sample;
      o_valid  <= i_valid;
      for (int c = 0; c < NCH; c++) begin
        if (i_sample[c] && !sample_q[c]) count_q[c] <= o_coarse;
        if (i_valid[c]) begin
          o_count[c] <= count_q[c];
          o_dout[c]  <= i_dout[c];
        end
      end
    end

endmodule
