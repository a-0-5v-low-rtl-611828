// pfd: behavioural model of the phase-frequency detector.
//
// This is a behavioural model, not synthesizable logic: the circuit is built
// from two dynamic half-transparent registers and a NOR gate, and its reset
// path delay sets the width of the narrow pulse, which the TDC downstream
// depends on. A rising edge of ref_clk sets UP, a rising edge of fb_clk sets
// DN; once both are set, a clear (the NOR of the registers' outputs) arrives
// RST_DELAY_PS later and takes both low, and the clear itself ends
// RST_DELAY_PS after they fall. So the earlier input gives a pulse as wide
// as the phase difference plus RST_DELAY_PS and the later one a pulse of
// RST_DELAY_PS. The 400 ps default is this design's choice: the lagging pulse
// must outlast the largest delay mismatch of the 15-stage, 20 ps Vernier
// TDC (300 ps) so that its latch comparators keep their decisions.
// rst_n (active low) holds both outputs low; it is an addition of this model.
module pfd #(
  parameter real RST_DELAY_PS = 400.0
) (
  input  logic ref_clk,
  input  logic fb_clk,
  input  logic rst_n,
  output logic up,
  output logic dn
);
  timeunit 1ps; timeprecision 1fs;

  logic both, clr;

  assign both = up & dn;

  delay_elem #(.DELAY_PS(RST_DELAY_PS)) u_rst_path (.in(both), .out(clr));

  always @(posedge ref_clk or posedge clr or negedge rst_n) begin
    if (!rst_n || clr) up <= 1'b0;
    else               up <= 1'b1;
  end

  always @(posedge fb_clk or posedge clr or negedge rst_n) begin
    if (!rst_n || clr) dn <= 1'b0;
    else               dn <= 1'b1;
  end
endmodule
