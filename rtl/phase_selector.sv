// phase_selector: behavioural model of the phase selector between the PFD
// and the Vernier TDC.
//
// This is a behavioural model, not synthesizable logic, because it relies on
// delay elements. A phase comparator decides which of UP and DN rose first
// and drives SIGN (1 = UP first, i.e. the reference leads). UP and DN each
// pass a delay element of DELAY_PS so that SIGN has settled before they reach
// two multiplexers: with SIGN = 1 the delayed UP goes to LEAD and the delayed
// DN to LAG; with SIGN = 0 they are swapped. The TDC behind it therefore
// always sees the earlier edge on LEAD. SIGN holds its value between
// comparisons. The delay value is this design's choice.
module phase_selector #(
  parameter real DELAY_PS = 30.0
) (
  input  logic up,
  input  logic dn,
  output logic sign,
  output logic lead,
  output logic lag
);
  timeunit 1ps; timeprecision 1fs;

  logic up_d, dn_d;

  phase_comparator u_comp (.in1(up), .in2(dn), .q(sign), .qb());

  delay_elem #(.DELAY_PS(DELAY_PS)) u_dly_up (.in(up), .out(up_d));
  delay_elem #(.DELAY_PS(DELAY_PS)) u_dly_dn (.in(dn), .out(dn_d));

  assign lead = sign ? up_d : dn_d;
  assign lag  = sign ? dn_d : up_d;
endmodule
