// therm2bin: thermometer-to-binary decoder of the fine TDC.
//
// The Vernier line produces a thermometer code, ones from stage 0 up to the
// stage where the stop edge overtook the start edge. The decoder returns the
// number of ones in the code. Counting ones instead of searching for the
// single 1-to-0 transition gives the same result for a clean code and
// degrades gracefully when metastable latches leave an isolated bubble; that
// choice is this design's. Purely combinational: a balanced adder tree of
// depth log2(N) after synthesis.
`timescale 1ps/1fs
module therm2bin #(
  parameter int unsigned N = snspd_pkg::FINE_STAGES,
  parameter int unsigned W = $clog2(N + 1)
) (
  input  logic [N-1:0] i_therm,
  output logic [W-1:0] o_bin
);

  always_comb begin
    o_bin = '0;
    for (int i = 0; i < N; i++)
      o_bin = o_bin + W'(i_therm[i]);
  end

endmodule
