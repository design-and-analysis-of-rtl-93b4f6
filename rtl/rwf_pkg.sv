// rwf_pkg: types shared by the reconfigurable wavelet filters.
//
// The filters are a family of multiplier-free 9/7 biorthogonal wavelet filters
// whose coefficients are all dyadic fractions (k / 2^n), so every coefficient
// product is an arithmetic right shift.  Each 9/7 filter is built as a Le Gall
// 5/3 filter plus extra "extension" hardware; the extension can be turned off
// on the fly to run the cheaper 5/3 filter.
//
// Number format (this design's choice): the input samples are signed integers.
// On entry to the datapath each sample is sign-extended and given FRAC_W
// fractional bits (shifted left by FRAC_W).  With FRAC_W >= 6 every shift used
// by the filters (at most 6 places) is exact, so outputs carry no rounding
// error: an output word y means the value y / 2^FRAC_W.
package rwf_pkg;

  // Which member of the filter family is built.  The letters follow the
  // subscripts A, B and C used for alpha = -1.67, -1.8 and -2.
  typedef enum logic [1:0] {
    VAR_A = 2'd0,   // alpha = -1.67
    VAR_B = 2'd1,   // alpha = -1.8
    VAR_C = 2'd2    // alpha = -2
  } variant_e;

  // Operating mode of a filter, carried with every sample down the pipeline.
  typedef enum logic {
    MODE_53 = 1'b0, // Le Gall 5/3 only, 9/7 extension switched off
    MODE_97 = 1'b1  // full 9/7 filter
  } mode_e;

  // Number of taps on each side of the centre sample (9-tap window: +-4).
  localparam int unsigned HALF_TAPS = 4;
  // Number of pre-added pairs w0..w4.
  localparam int unsigned NUM_W = HALF_TAPS + 1;

endpackage
