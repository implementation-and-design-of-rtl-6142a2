// fir_pkg: widths and default coefficients shared by the FIR filter modules.
//
// The filter takes 8-bit two's-complement samples and produces a 16-bit
// two's-complement result, and has four taps; these three numbers follow the
// filter's specification. The coefficient width (8 bits, signed) is this
// design's own choice. The default coefficient set h = {3, 1, 2, 1} is the one
// whose impulse-response table the filter is verified against.
package fir_pkg;

  localparam int unsigned NTAPS_DEF = 4;   // taps (filter order 3)
  localparam int unsigned DW_DEF    = 8;   // input sample width
  localparam int unsigned OW_DEF    = 16;  // output width
  localparam int unsigned CW_DEF    = 8;   // coefficient width (own choice)

  typedef logic signed [DW_DEF-1:0] sample_t;
  typedef logic signed [OW_DEF-1:0] result_t;
  typedef logic signed [CW_DEF-1:0] coeff_t;

  // Default coefficients b0..b3.
  localparam coeff_t COEFFS_DEF [NTAPS_DEF] = '{coeff_t'(3), coeff_t'(1),
                                                coeff_t'(2), coeff_t'(1)};

endpackage
