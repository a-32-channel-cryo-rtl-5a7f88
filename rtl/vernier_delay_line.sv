// vernier_delay_line: behavioural model of the fine TDC's Vernier delay line.
//
// This is a behavioural model of an analog circuit, not synthesizable logic.
// The start edge (the detected event) travels down a chain of slower delay
// stages, the stop edge (the next high-speed clock edge) down a chain of
// faster ones; a latch at every stage records whether the start edge still
// leads the stop edge there. Stage i therefore reads 1 when the start-to-stop
// interval exceeds (i+1) * (T_START - T_STOP), which gives a thermometer code
// with a 5 ps step. o_delay_done rises once both edges have left the last
// stage, when every latch has settled; the code is valid from then on.
// When start or stop falls (the self-timed clear of the TDC logic) the
// latches and o_delay_done are cleared at once.
//
// Ports follow the fine TDC schematic: o_start and o_stop of the TDC logic
// drive i_start and i_stop; i_delay_therm_code and i_delay_done of the TDC
// logic are driven by o_therm_code and o_delay_done. Stage delays are this
// model's choice; only their difference (the 5 ps step) is the published one.
`timescale 1ps/1fs
module vernier_delay_line #(
  parameter int unsigned STAGES     = snspd_pkg::FINE_STAGES,
  parameter real         T_STOP_PS  = 20.0,  // fast line, per stage
  parameter real         T_START_PS = 25.0   // slow line, per stage
) (
  input  logic              i_start,
  input  logic              i_stop,
  output logic [STAGES-1:0] o_therm_code,
  output logic              o_delay_done
);

  real         t_start;
  real         dt;
  real         settle;
  int unsigned gen;
  int unsigned my_gen;
  logic [STAGES-1:0] code;

  initial begin
    o_therm_code = '0;
    o_delay_done = 1'b0;
    t_start      = 0.0;
    gen          = 0;
  end

  always @(posedge i_start) t_start = $realtime;

  // Evaluate the interval when the stop edge enters the line and publish
  // the settled latch states when the slower of the two edges leaves it.
  always @(posedge i_stop) begin
    gen    = gen + 1;
    my_gen = gen;
    dt     = $realtime - t_start;
    for (int i = 0; i < STAGES; i++)
      code[i] = (dt > (i + 1) * (T_START_PS - T_STOP_PS));
    settle = STAGES * T_STOP_PS;
    if (STAGES * T_START_PS - dt > settle) settle = STAGES * T_START_PS - dt;
    #(settle);
    if (my_gen == gen && i_start && i_stop) begin
      o_therm_code = code;
      o_delay_done = 1'b1;
    end
  end

  always @(negedge i_start or negedge i_stop) begin
    gen          = gen + 1;
    o_therm_code = '0;
    o_delay_done = 1'b0;
  end

endmodule
