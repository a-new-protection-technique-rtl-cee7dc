// ft_fir_pkg: constants and types shared by the soft-error-protected FIR.
//
// The filter is an 8-bit low-pass FIR whose delay line is protected by a
// two-dimensional parity: one vertical parity bit (Pv) per delay-line word and
// one horizontal parity bit (Ph) per bit position across all words. This
// package holds the word width, the two coefficient sets the design is
// evaluated with (6 taps, the main configuration, and 10 taps) and the code
// that reports which error scenario the parity checker sees.
//
// The widths and coefficients follow the published filter; the scenario
// encoding is this design's own choice.
package ft_fir_pkg;

  // Sample width of input and output.
  localparam int DATA_W = 8;

  // Main configuration: 6-tap symmetric low-pass filter.
  localparam int NTAPS6 = 6;
  localparam int COEF6 [NTAPS6] = '{-1, 24, 50, 50, 24, -1};

  // Larger configuration: 10-tap symmetric filter.
  localparam int NTAPS10 = 10;
  localparam int COEF10 [NTAPS10] = '{-1, 3, 50, 64, 96, 96, 64, 50, 3, -1};

  // What the comparison of stored and recomputed parities shows in a cycle.
  typedef enum logic [2:0] {
    ERR_NONE  = 3'd0,  // all parities agree
    ERR_DATA  = 3'd1,  // one Pv and one Ph disagree: single data-bit upset, corrected
    ERR_PH    = 3'd2,  // one Ph disagrees, no Pv: upset in that Ph, corrected
    ERR_PV    = 3'd3,  // one Pv disagrees, no Ph: upset in that Pv, left to shift out
    ERR_MULTI = 3'd4   // any other pattern: more than one upset
  } err_class_e;

endpackage
