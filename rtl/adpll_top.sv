// adpll_top: 0.5 V all-digital phase-locked loop, 25 MHz in, 400 MHz out.
//
// The loop: the PFD compares the reference with the divided DCO clock; the
// phase selector turns its UP/DN pulses into a SIGN bit and an ordered
// LEAD/LAG pair; the Vernier TDC measures the LEAD-to-LAG time as a 4-bit
// magnitude (20 ps steps); the PI loop filter, clocked by the reference,
// integrates the signed error into a 9.4 fixed-point word (it samples the
// TDC on the falling reference edge, when the measurement of the current
// cycle is complete whichever clock leads); the 9 integer
// bits set the DCO (5 binary coarse bits and 4 fine bits decoded to
// thermometer code) and the 4 fraction bits drive a first-order
// sigma-delta modulator, clocked by the DCO output, whose overflow bit
// dithers the DCO by one fine step. A divide-by-16 counter closes the loop.
//
// Ports: ref_input, ph1, ph2 and divider_out are the chip's signal pins;
// rst_n is added by this design (reset holds the PFD, stops the ring and
// loads the loop filter with INIT_CODE); the remaining outputs expose the
// loop's internal words for observation. The DCO, the delay lines and the
// comparators are behavioural models; the loop filter, modulator, decoders
// and divider are synthesizable.
module adpll_top #(
  parameter int unsigned DIV_N     = adpll_pkg::DIV_N,
  parameter int unsigned INIT_CODE = 1 << (adpll_pkg::DCO_BITS - 1)
) (
  input  logic                 ref_input,
  input  logic                 rst_n,
  output logic                 ph1,
  output logic                 ph2,
  output logic                 divider_out,
  output logic [adpll_pkg::DCO_BITS-1:0]  dco_code,
  output logic [adpll_pkg::FRAC_BITS-1:0] dco_frac,
  output logic [adpll_pkg::TDC_BITS-1:0]  tdc_code,
  output logic                 tdc_sign,
  output logic                 dither,
  output logic                 dlf_sat
);
  timeunit 1ps; timeprecision 1fs;

  logic up, dn, lead, lag;
  logic [adpll_pkg::FINE_LINES-1:0] fine_therm;
  adpll_pkg::dco_word_t             word;

  pfd u_pfd (.ref_clk(ref_input), .fb_clk(divider_out), .rst_n(rst_n), .up(up), .dn(dn));

  phase_selector u_sel (.up(up), .dn(dn), .sign(tdc_sign), .lead(lead), .lag(lag));

  vernier_tdc #(.STAGES(adpll_pkg::TDC_STAGES), .DT_PS(adpll_pkg::TDC_DT_PS), .W(adpll_pkg::TDC_BITS)) u_tdc (
    .lead(lead), .lag(lag), .therm(), .code(tdc_code));

  dlf #(.INIT_CODE(INIT_CODE)) u_dlf (
    .clk(~ref_input), .rst_n(rst_n), .tdc_code(tdc_code), .sign(tdc_sign),
    .dco_code(word.code), .frac(word.frac), .sat(dlf_sat));

  sdm #(.K(adpll_pkg::FRAC_BITS)) u_sdm (.clk(ph1), .rst_n(rst_n), .x(word.frac), .y(dither));

  bin2therm #(.FINE_BITS(adpll_pkg::FINE_BITS)) u_b2t (
    .fine(word.code[adpll_pkg::FINE_BITS-1:0]), .dither(dither), .therm(fine_therm));

  dco #(.STAGES(5), .COARSE_W(adpll_pkg::COARSE_BITS), .LINES(adpll_pkg::FINE_LINES),
        .F_MIN_HZ(adpll_pkg::F_MIN_HZ), .K_DCO_HZ(adpll_pkg::K_DCO_HZ)) u_dco (
    .en(rst_n), .coarse(word.code[adpll_pkg::DCO_BITS-1:adpll_pkg::FINE_BITS]), .therm(fine_therm),
    .ph1(ph1), .ph2(ph2));

  divider #(.N(DIV_N)) u_div (.clk(ph1), .rst_n(rst_n), .out(divider_out));

  assign dco_code = word.code;
  assign dco_frac = word.frac;
endmodule
