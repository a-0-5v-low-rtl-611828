// vernier_tdc: behavioural model of the 4-bit Vernier time-to-digital
// converter.
//
// This is a behavioural model of the delay lines and comparators, which are
// transistor-level circuits; the thermometer-to-binary decoder behind them is
// synthesizable (therm2bin). LEAD travels down a chain of STAGES delay
// elements of T_PS + DT_PS each, LAG down a chain of elements of T_PS, so the
// gap between the two edges shrinks by DT_PS per stage. The phase comparator
// at stage k (k = 1..STAGES) records whether LEAD is still ahead after k
// stages, giving therm[k-1] = 1 when the LEAD-to-LAG delay exceeds k*DT_PS.
// code is the number of ones (0..15): the phase-error magnitude in units of
// DT_PS (20 ps), saturating at 15 for errors above 300 ps. The outputs hold
// between measurements; a measurement is complete STAGES*(T_PS+DT_PS) after
// the LEAD edge. The base delay T_PS and the stage count are this design's
// choices.
module vernier_tdc #(
  parameter int unsigned STAGES = 15,
  parameter real         T_PS   = 40.0,
  parameter real         DT_PS  = 20.0,
  parameter int unsigned W      = $clog2(STAGES + 1)
) (
  input  logic              lead,
  input  logic              lag,
  output logic [STAGES-1:0] therm,
  output logic [W-1:0]      code
);
  timeunit 1ps; timeprecision 1fs;

  logic [STAGES:0]   lead_d, lag_d;

  assign lead_d[0] = lead;
  assign lag_d[0]  = lag;

  for (genvar k = 1; k <= STAGES; k++) begin : g_stage
    delay_elem #(.DELAY_PS(T_PS + DT_PS)) u_lead (.in(lead_d[k-1]), .out(lead_d[k]));
    delay_elem #(.DELAY_PS(T_PS))         u_lag  (.in(lag_d[k-1]),  .out(lag_d[k]));
    phase_comparator u_cmp (.in1(lead_d[k]), .in2(lag_d[k]), .q(therm[k-1]), .qb());
  end

  therm2bin #(.N(STAGES), .W(W)) u_dec (.therm(therm), .bin(code));
endmodule
