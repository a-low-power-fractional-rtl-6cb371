// Shared constants and types of the dual-mode CIC decimator.
//
// The numbers are the receiver specification: ADC rate fs = 99.84 MHz, IF = 5/4 fs,
// GSM decimation by 46 2/25 with 18-bit integrators and 14-bit derivators, WCDMA
// decimation by 13 with 13-bit integrators and 8-bit derivators. The CIC order (3,
// one wordlength per stage), the 2-bit ADC code and the interpolation-fraction width
// are this design's choices.
package cic_pkg;

  // CIC order: one integrator and one derivator per stage.
  localparam int unsigned CIC_ORDER = 3;

  // Bandpass sigma-delta ADC output code width (two's complement).
  localparam int unsigned ADC_W = 2;
  // I/Q splitter output width: negating a 2-bit code needs one more bit.
  localparam int unsigned BB_W = ADC_W + 1;

  // GSM branch: decimation by GSM_R_INT + GSM_FRAC_NUM/GSM_FRAC_DEN = 46 2/25.
  localparam int unsigned GSM_R_INT    = 46;
  localparam int unsigned GSM_FRAC_NUM = 2;
  localparam int unsigned GSM_FRAC_DEN = 25;
  localparam int unsigned GSM_INT_W    = 18;
  localparam int unsigned GSM_DER_W    = 14;

  // WCDMA branch: integer decimation by 13.
  localparam int unsigned WCDMA_R     = 13;
  localparam int unsigned WCDMA_INT_W = 13;
  localparam int unsigned WCDMA_DER_W = 8;

  // Control word widths.
  localparam int unsigned R_W    = 8;   // integer part of the ratio
  localparam int unsigned FRAC_W = 8;   // numerator / denominator of the fraction
  localparam int unsigned MU_W   = 10;  // interpolation fraction, unsigned, 2^-MU_W units

  // Which decimator pair is running.
  typedef enum logic {
    MODE_GSM   = 1'b0,
    MODE_WCDMA = 1'b1
  } rx_mode_e;

endpackage
