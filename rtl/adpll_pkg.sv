// adpll_pkg: constants shared by the ADPLL blocks.
//
// The numbers are the loop's headline configuration: a 25 MHz reference
// multiplied by 16 to 400 MHz, a 9-bit DCO control word (5 binary coarse bits,
// 4 fine bits that are decoded to thermometer code), a 4-bit fractional word
// that a first-order sigma-delta modulator turns into LSB dithering, a 4-bit
// Vernier TDC with 20 ps resolution, and a proportional-integral loop filter
// with Kp = 2^-1 and Ki = 2^-4. The analog figures (DCO gain, frequencies,
// TDC step) are used only by the behavioural models and by the testbenches.
package adpll_pkg;
  timeunit 1ps; timeprecision 1fs;

  localparam int unsigned DCO_BITS    = 9;   // integer DCO control word
  localparam int unsigned COARSE_BITS = 5;   // binary-weighted coarse bits D5..D9
  localparam int unsigned FINE_BITS   = 4;   // fine bits D1..D4, thermometer-decoded
  localparam int unsigned FRAC_BITS   = 4;   // DLF fraction fed to the SDM
  localparam int unsigned TDC_BITS    = 4;   // TDC output magnitude
  localparam int unsigned TDC_STAGES  = (1 << TDC_BITS) - 1;
  localparam int unsigned FINE_LINES  = 1 << FINE_BITS;  // T1..T16
  localparam int unsigned DIV_N       = 16;  // feedback division ratio
  localparam int unsigned KP_SHIFT    = 1;   // Kp = 2^-1
  localparam int unsigned KI_SHIFT    = 4;   // Ki = 2^-4

  // Analog figures used by the behavioural models and testbenches.
  localparam real K_DCO_HZ  = 563.0e3;  // DCO gain per code (typical corner)
  localparam real F_MIN_HZ  = 220.0e6;  // frequency at code 0 (model choice)
  localparam real TDC_DT_PS = 20.0;     // Vernier resolution

  // DLF output word: integer DCO code and fraction, kept together.
  typedef struct packed {
    logic [DCO_BITS-1:0]  code;
    logic [FRAC_BITS-1:0] frac;
  } dco_word_t;
endpackage
