// clock_controller: derives the reduced-rate counter clock o_cclk.
//
// The coarse TDC counts rising edges of the high-speed clock; the counter
// clock o_cclk runs at 1/2^DIV_BITS of that rate and rises exactly when the
// coarse count rolls over, so that it marks rollover events both inside the
// chip (the aggregator re-aligns its coarse counter to it) and outside (it
// is brought out on a pin, where a receiver can count rollovers and extend
// timestamps beyond the coarse counter's range).
// How it works: a free-running DIV_BITS counter; o_cclk is a flop holding
// the inverted counter MSB, so it is high for the first half of each counter
// period and its rising edge coincides with the counter passing zero. The
// enable i_cclk_en is only sampled at a rollover, so o_cclk never produces a
// shortened pulse.
// The document names the clock controller and the reduced-rate clock but not
// its insides; the divider and the enable are this design's choices.
`timescale 1ps/1fs
module clock_controller #(
  parameter int unsigned DIV_BITS = snspd_pkg::COARSE_BITS
) (
  input  logic i_hsclk,
  input  logic i_rst_n,
  input  logic i_cclk_en,
  output logic o_cclk
);

  logic [DIV_BITS-1:0] div;
  logic [DIV_BITS-1:0] div_next;
  logic                en_q;
  logic                en_next;

  assign div_next = div + 1'b1;
  assign en_next  = (div == '1) ? i_cclk_en : en_q;

  always_ff @(posedge i_hsclk or negedge i_rst_n)
    if (!i_rst_n) begin
      div    <= '0;
      en_q   <= 1'b0;
      o_cclk <= 1'b0;
    end else begin
      div    <= div_next;
      en_q   <= en_next;
      o_cclk <= en_next & ~div_next[DIV_BITS-1];
    end

endmodule
