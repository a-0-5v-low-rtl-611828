// delay_elem: behavioural model of a non-inverting delay element.
//
// This is a behavioural model, not synthesizable logic: it stands for a
// transistor-level buffer whose delay matters to the circuit around it
// (the Vernier TDC delay lines, the phase selector, the PFD reset path).
// Every rising and every falling input edge reappears at the output DELAY_PS
// later (transport delay), so a pulse keeps its width as long as it is wider
// than zero; two edges of the same direction closer than DELAY_PS are merged.
module delay_elem #(
  parameter real DELAY_PS = 20.0
) (
  input  logic in,
  output logic out
);
  timeunit 1ps; timeprecision 1fs;

  initial out = 1'b0;

  always @(posedge in) begin
    #(DELAY_PS) out <= 1'b1;
  end

  always @(negedge in) begin
    #(DELAY_PS) out <= 1'b0;
  end
endmodule
