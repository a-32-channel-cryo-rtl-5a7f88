// tdc_logic: digital part of one readout channel's fine TDC.
//
// Follows the fine TDC schematic of the design:
//  * o_start is set by the rising edge of i_event; o_stop copies o_start on
//    the next rising edge of i_hsclk. Both are cleared by clear_n. The
//    interval between them is what the Vernier line measures.
//  * On i_delay_done the line's thermometer code is captured; it is decoded
//    to binary by therm2bin.
//  * i_delay_done is passed through a chain of four i_hsclk flops. The third
//    stage drives clear_n (active while it is high), which re-arms start,
//    stop and the line: the self-timed reset. The third stage high while the
//    fourth is still low is a one-cycle strobe that loads the decoded code
//    into o_dout (the gated output register) and, one flop later, becomes
//    o_dout_valid. o_dout and o_dout_valid therefore change on the same edge.
//  * o_sample is o_stop. It tells the aggregator at which i_hsclk edge the
//    measurement was anchored, so that it can latch the coarse count.
// Timing: o_dout_valid is a one-cycle pulse on the fourth i_hsclk edge
// after i_delay_done rises (with the delay-line model, the eighth edge after
// the stop edge). After the clear, a new measurement needs a new rising
// edge on i_event.
// This design's own choices: an asynchronous active-low i_rst_n on every
// flop (it also forces clear_n) and a plain enable in place of the clock gate.
`timescale 1ps/1fs
module tdc_logic #(
  parameter int unsigned STAGES = snspd_pkg::FINE_STAGES,
  parameter int unsigned W      = $clog2(STAGES + 1)
) (
  input  logic              i_hsclk,
  input  logic              i_rst_n,
  input  logic              i_event,
  output logic              o_start,
  output logic              o_stop,
  input  logic [STAGES-1:0] i_delay_therm_code,
  input  logic              i_delay_done,
  output logic              o_sample,
  output logic [W-1:0]      o_dout,
  output logic              o_dout_valid
);

  logic              clear_n;
  logic [3:0]        done_sr;   // done_sr[0] is the first flop of the chain
  logic              strobe;
  logic [STAGES-1:0] therm_q;
  logic [W-1:0]      bin;

  assign clear_n = i_rst_n & ~done_sr[2];
  assign strobe  = done_sr[2] & ~done_sr[3];
  assign o_sample = o_stop;

  always_ff @(posedge i_event or negedge clear_n)
    if (!clear_n) o_start <= 1'b0;
    else          o_start <= 1'b1;

  always_ff @(posedge i_hsclk or negedge clear_n)
    if (!clear_n) o_stop <= 1'b0;
    else          o_stop <= o_start;

  // Code capture flops, clocked by the line's completion signal.
  always_ff @(posedge i_delay_done or negedge i_rst_n)
    if (!i_rst_n) therm_q <= '0;
    else          therm_q <= i_delay_therm_code;

  therm2bin #(.N(STAGES), .W(W)) u_dec (.i_therm(therm_q), .o_bin(bin));

  always_ff @(posedge i_hsclk or negedge i_rst_n)
    if (!i_rst_n) begin
      done_sr      <= '0;
      o_dout       <= '0;
      o_dout_valid <= 1'b0;
    end else begin
      done_sr      <= {done_sr[2:0], i_delay_done};
      o_dout_valid <= strobe;
      if (strobe) o_dout <= bin;
    end

  // One result per measurement: valid is never high two cycles running.
  a_valid_pulse: assert property (@(posedge i_hsclk) disable iff (!i_rst_n)
    o_dout_valid |=> !o_dout_valid);

endmodule
