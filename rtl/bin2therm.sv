// bin2therm: binary-to-thermometer decoder of the DCO voltage-control circuit.
//
// The DCO supply is set by a PMOS array: five binary-weighted coarse bits and
// a fine section of sixteen equal devices T1..T16 driven in thermometer code
// for linearity. This decoder takes the four fine bits D1..D4 and the 1-bit
// dither from the sigma-delta modulator and turns on as many fine lines as
// their sum (0..16): therm[k-1] = T_k = 1 when fine + dither >= k. Adding the
// dither before decoding is this design's reading of how the sixteenth line
// is used; the original design only states that the SDM dithers the DCO LSB.
// Combinational.
module bin2therm #(
  parameter int unsigned FINE_BITS = 4,
  parameter int unsigned LINES     = 1 << FINE_BITS
) (
  input  logic [FINE_BITS-1:0] fine,
  input  logic                 dither,
  output logic [LINES-1:0]     therm
);
  timeunit 1ps; timeprecision 1fs;

  logic [FINE_BITS:0] level;

  always_comb begin
    level = {1'b0, fine} + (FINE_BITS+1)'(dither);
    for (int unsigned k = 0; k < LINES; k++)
      therm[k] = ((FINE_BITS+1)'(k) < level);
  end
endmodule
