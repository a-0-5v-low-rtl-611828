// therm2bin: thermometer-to-binary decoder at the end of the Vernier TDC.
//
// The TDC's phase comparators produce a thermometer code: bit k is 1 when the
// leading edge is still ahead after k+1 Vernier stages. This decoder outputs
// the number of ones. Counting ones (rather than locating the 1->0 boundary)
// is this design's choice: a bubble in the code then still gives a monotonic
// result. Purely combinational; no clock.
module therm2bin #(
  parameter int unsigned N = 15,              // thermometer width
  parameter int unsigned W = $clog2(N + 1)    // binary width
) (
  input  logic [N-1:0] therm,
  output logic [W-1:0] bin
);
  timeunit 1ps; timeprecision 1fs;

  always_comb begin
    bin = '0;
    for (int unsigned i = 0; i < N; i++)
      bin = bin + W'(therm[i]);
  end
endmodule
