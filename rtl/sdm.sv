// sdm: first-order sigma-delta modulator that dithers the DCO LSB.
//
// An accumulator of K bits: each clock the K-bit fraction x is added to the
// stored residue, the carry out of the (K+1)-bit sum is the 1-bit output y,
// and the low K bits (the negated quantisation error) are stored for the
// next clock. The average of y equals x / 2^K, so for x = 1/16 the output is
// 1 once every 16 clocks. This follows the original design's signal flow;
// the reset value and the registered output are this design's choices.
// Clocked by the DCO output; y is registered and changes on the clk edge.
module sdm #(
  parameter int unsigned K = 4
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic [K-1:0] x,
  output logic         y
);
  timeunit 1ps; timeprecision 1fs;

  logic [K-1:0] residue;
  logic [K:0]   v;

  assign v = {1'b0, x} + {1'b0, residue};

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      residue <= '0;
      y       <= 1'b0;
    end else begin
      residue <= v[K-1:0];
      y       <= v[K];
    end
  end
endmodule
