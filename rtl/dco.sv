// dco: behavioural model of the digitally-controlled oscillator.
//
// This is a behavioural model, not synthesizable logic. The oscillator is a
// ring of STAGES (5) bootstrapped delay cells. Its frequency is set through
// the cells' supply VSUP, which a PMOS array between VDD and the ring
// controls as a variable resistor: five binary-weighted coarse bits (D5..D9)
// and sixteen equal fine devices driven in thermometer code (T1..T16). The
// array is sized for a linear code-to-frequency curve, so the model uses
//     n = 16*coarse + (number of ones in therm)      (0..512)
//     f = F_MIN_HZ + K_DCO_HZ * n,   T_D = 1 / (2 * STAGES * f)
// and gives each cell the delay T_D. K_DCO_HZ = 563 kHz/code is the typical
// corner gain; F_MIN_HZ = 220 MHz is this design's choice, made so that the
// 240..480 MHz locking range lies inside the model's 220..508 MHz span.
// en low forces the ring input low (an enable gate of this design), so the
// ring starts with a single travelling edge when en rises. ph1 is the last
// stage and ph2 the stage before it, one cell delay earlier and inverted.
module dco #(
  parameter int unsigned STAGES   = 5,
  parameter int unsigned COARSE_W = 5,
  parameter int unsigned LINES    = 16,
  parameter real         F_MIN_HZ = 220.0e6,
  parameter real         K_DCO_HZ = 563.0e3
) (
  input  logic                en,
  input  logic [COARSE_W-1:0] coarse,
  input  logic [LINES-1:0]    therm,
  output logic                ph1,
  output logic                ph2
);
  timeunit 1ps; timeprecision 1fs;

  int unsigned n;
  real         f_hz, td_ps;
  logic [STAGES-1:0] s;
  logic              ring_in;

  always_comb begin
    n     = LINES * 32'(coarse) + 32'($countones(therm));
    f_hz  = F_MIN_HZ + K_DCO_HZ * real'(n);
    td_ps = 1.0e12 / (2.0 * real'(STAGES) * f_hz);
  end

  assign ring_in = en & s[STAGES-1];

  for (genvar i = 0; i < STAGES; i++) begin : g_ring
    bootstrap_cell u_cell (.in((i == 0) ? ring_in : s[(i == 0) ? 0 : i-1]), .td_ps(td_ps), .out(s[i]));
  end

  assign ph1 = s[STAGES-1];
  assign ph2 = s[STAGES-2];

  initial assert (STAGES % 2 == 1 && STAGES >= 3) else $error("dco: ring needs an odd number of stages");
endmodule
