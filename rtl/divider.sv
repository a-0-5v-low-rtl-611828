// divider: divide-by-N feedback divider (N = 16 in the ADPLL).
//
// A free-running counter clocked by the DCO output. The output is high for
// the second half of every N input cycles, so it has one rising edge per N
// DCO cycles and, for even N, a 50% duty cycle. The counter structure and
// the asynchronous active-low reset are this design's choices; the original
// gives only the ratio. The output is registered, so it changes one clk edge
// after the count reaches N/2 or wraps.
module divider #(
  parameter int unsigned N = 16
) (
  input  logic clk,
  input  logic rst_n,
  output logic out
);
  timeunit 1ps; timeprecision 1fs;

  localparam int unsigned CW = (N > 2) ? $clog2(N) : 1;
  logic [CW-1:0] cnt;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      cnt <= '0;
      out <= 1'b0;
    end else begin
      cnt <= (cnt == CW'(N - 1)) ? '0 : cnt + 1'b1;
      // out is high while the next count is in the upper half
      out <= ((cnt == CW'(N - 1)) ? 1'b0 : (cnt + 1'b1 >= CW'(N / 2)));
    end
  end

  initial assert (N >= 2) else $error("divider: N must be at least 2");
endmodule
