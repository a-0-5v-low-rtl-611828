// bootstrap_cell: behavioural model of the bootstrapped delay cell.
//
// This is a behavioural model, not synthesizable logic. The real cell is an
// inverter whose pull-up and pull-down transistors are switched through two
// bootstrap capacitors, so its output swings from -VSUP to 2VSUP; that keeps
// the next stage's transistors above threshold at a 0.5 V supply. In
// two-state logic only its function remains: out is the inverse of in,
// delayed by td_ps. td_ps stands for the supply-dependent delay T_D (the
// mean of the rise and fall delays), which the DCO model computes from its
// control code; rise and fall are therefore equal here. The delay is sampled
// when the input edge arrives, and after it the output takes the inverse of
// the input as it is then, so a pulse shorter than the delay is swallowed
// (inertial delay, as in a real gate) and the ring always recovers from a
// start-up with several edges in flight.
module bootstrap_cell (
  input  logic in,
  input  real  td_ps,
  output logic out
);
  timeunit 1ps; timeprecision 1fs;

  // settle to a consistent value shortly after start-up
  initial begin
    #1 out = ~in;
  end

  always @(posedge in) begin
    #(td_ps) out <= ~in;
  end

  always @(negedge in) begin
    #(td_ps) out <= ~in;
  end
endmodule
