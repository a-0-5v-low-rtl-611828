// phase_comparator: behavioural model of the latch-based phase comparator
// (arbiter) used in each Vernier TDC stage and in the phase selector.
//
// This is a behavioural model, not synthesizable logic. The circuit is a pair
// of cross-coupled NAND gates driven by in1/in2, followed by a second
// cross-coupled NAND pair that holds the decision on q/qb. When in1 rises
// while in2 is low, q becomes 1; when in2 rises while in1 is low, q becomes
// 0; an input that rises while the other is already high changes nothing,
// and when both return low the second latch keeps the last decision. The
// model reproduces exactly this event behaviour with a decision delay
// T_CMP_PS (this design's value). Exact ties are decided by simulator event
// order; metastability is not modelled.
module phase_comparator #(
  parameter real T_CMP_PS = 5.0
) (
  input  logic in1,
  input  logic in2,
  output logic q,
  output logic qb
);
  timeunit 1ps; timeprecision 1fs;

  initial q = 1'b0;
  assign qb = ~q;

  always @(posedge in1) begin
    if (!in2) #(T_CMP_PS) q <= 1'b1;
  end

  always @(posedge in2) begin
    if (!in1) #(T_CMP_PS) q <= 1'b0;
  end
endmodule
