// dlf: proportional-integral digital loop filter of the ADPLL.
//
// Once per reference period (clk = F_REF) the signed phase error
// e = (sign ? +tdc_code : -tdc_code) is filtered as
//     H(z) = Kp + Ki / (1 - z^-1),  Kp = 2^-KP_SHIFT, Ki = 2^-KI_SHIFT,
// which is the bilinear-transformed first-order RC filter of a charge-pump
// loop. The output word is fixed point: INT_BITS integer bits form the DCO
// control code and FRAC_BITS fraction bits go to the sigma-delta modulator.
// In fraction units, Ki*e = e << (FRAC_BITS - KI_SHIFT) and
// Kp*e = e << (FRAC_BITS - KP_SHIFT).
//
// sign = 1 means the reference edge came first (the feedback clock is late),
// so the code is increased to speed the DCO up. The integrator and the output
// are clamped to [0, 2^INT_BITS - 2^-FRAC_BITS]; sat reports a clamp of the
// output. The clamp, the reset value INIT_CODE and the registered output are
// this design's choices. Timing: tdc_code and sign are sampled on the rising
// clk edge and the new code appears on the same edge (one register).
module dlf #(
  parameter int unsigned TDC_BITS  = adpll_pkg::TDC_BITS,
  parameter int unsigned INT_BITS  = adpll_pkg::DCO_BITS,
  parameter int unsigned FRAC_BITS = adpll_pkg::FRAC_BITS,
  parameter int unsigned KP_SHIFT  = adpll_pkg::KP_SHIFT,
  parameter int unsigned KI_SHIFT  = adpll_pkg::KI_SHIFT,
  parameter int unsigned INIT_CODE = 1 << (INT_BITS - 1)
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic [TDC_BITS-1:0]  tdc_code,
  input  logic                 sign,
  output logic [INT_BITS-1:0]  dco_code,
  output logic [FRAC_BITS-1:0] frac,
  output logic                 sat
);
  timeunit 1ps; timeprecision 1fs;

  localparam int unsigned OW = INT_BITS + FRAC_BITS;      // output word width
  localparam int unsigned SW = OW + 3;                    // signed work width
  localparam logic signed [SW-1:0] MAXV = SW'((1 << OW) - 1);

  logic [OW-1:0]        integ;                            // z^-1 register
  logic signed [SW-1:0] e, ki_e, kp_e, integ_sum, out_sum;
  logic [OW-1:0]        integ_next, out_next;
  logic                 out_clamped;

  function automatic logic [OW-1:0] clamp(input logic signed [SW-1:0] v);
    if (v < 0)         return '0;
    else if (v > MAXV) return OW'(MAXV);
    else               return OW'(v);
  endfunction

  always_comb begin
    e          = sign ? SW'(tdc_code) : -SW'(tdc_code);
    ki_e       = e <<< (FRAC_BITS - KI_SHIFT);
    kp_e       = e <<< (FRAC_BITS - KP_SHIFT);
    integ_sum  = $signed({3'b000, integ}) + ki_e;
    integ_next = clamp(integ_sum);
    out_sum    = $signed({3'b000, integ_next}) + kp_e;
    out_next   = clamp(out_sum);
    out_clamped = (out_sum < 0) || (out_sum > MAXV);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      integ    <= OW'(INIT_CODE) << FRAC_BITS;
      dco_code <= INT_BITS'(INIT_CODE);
      frac     <= '0;
      sat      <= 1'b0;
    end else begin
      integ              <= integ_next;
      {dco_code, frac}   <= out_next;
      sat                <= out_clamped;
    end
  end

  initial begin
    assert (KI_SHIFT <= FRAC_BITS && KP_SHIFT <= FRAC_BITS)
      else $error("dlf: gains finer than the fraction width are not supported");
    assert (INIT_CODE < (1 << INT_BITS)) else $error("dlf: INIT_CODE out of range");
  end
endmodule
