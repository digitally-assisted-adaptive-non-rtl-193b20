// nls_pkg: shared constants of the digitally assisted non-linearity
// suppression loop.
//
// The loop watches an analog channel-select filter (CSF) through a cheap
// auxiliary ADC, regenerates third-order intermodulation digitally, and
// tunes the filter's bias until the intermodulation left in its output is at
// a minimum. The numbers below are the configuration of the auxiliary path
// (6-bit ADC, 9-tap NLMS filter with 10-bit coefficients and output, 6-bit
// cubing unit, 16-bit correlator multipliers) and the LTE timing it runs at
// (30.72 MHz baseband, oversampling ratio 8, 2048-sample OFDM symbols of
// which 2000 are correlated after a 48-sample LMS settling margin).
// Widths not fixed by that configuration (main ADC width, bias DAC code
// width, fixed-point scaling) are this design's own choices and are marked.
package nls_pkg;

  // Auxiliary path configuration
  localparam int unsigned AUX_ADC_W   = 6;    // auxiliary ADC resolution
  localparam int unsigned LMS_TAPS    = 9;    // NLMS filter length
  localparam int unsigned LMS_COEF_W  = 10;   // NLMS coefficient width
  localparam int unsigned LMS_OUT_W   = 10;   // NLMS output (z) width
  localparam int unsigned CUBE_W      = 6;    // cubing unit output width
  localparam int unsigned CORR_MUL_W  = 16;   // correlator multiplier operand width

  // Rates and symbol timing
  localparam int unsigned OSR         = 8;    // 245.76 MS/s over 30.72 MS/s
  localparam int unsigned SYM_LEN     = 2048; // baseband samples per OFDM symbol
  localparam int unsigned CORR_LEN    = 2000; // correlated samples per symbol
  localparam int unsigned LMS_MARGIN  = 48;   // samples left for LMS settling

  // Own choices
  localparam int unsigned MAIN_ADC_W  = 12;   // main ADC resolution (assumed)
  localparam int unsigned BIAS_W      = 8;    // bias DAC code width (assumed)

  // States of the bias tuner
  typedef enum logic [1:0] {
    TUNE_IDLE,     // auxiliary path powered down, waiting for a request
    TUNE_FIRST,    // first correlation at the starting bias
    TUNE_SEARCH,   // one bias step per symbol, step halved on each reversal
    TUNE_DONE      // optimum reached, auxiliary path powered down
  } tune_state_e;

endpackage
