// fir_pkg: widths and default coefficients shared by the FIR filters, the
// Booth multiplier and the multiplier-accumulator.
//
// The filters take signed two's-complement samples and constant signed
// coefficients. Neither word length nor coefficient values nor the number of
// taps is fixed by the original design description; the values below are
// this design's choices: 8-bit samples, 8-bit coefficients and four taps (the
// number of shift-register stages drawn in the shift-register filter's block
// diagram). The default coefficients form a small symmetric low-pass filter
// with negative outer taps so that subtraction paths are exercised.
package fir_pkg;

  localparam int DEF_DATA_W = 8;   // sample width
  localparam int DEF_COEF_W = 8;   // coefficient width
  localparam int DEF_TAPS   = 4;   // filter length

  localparam logic signed [DEF_COEF_W-1:0] DEFAULT_COEFS [DEF_TAPS] = '{
    -8'sd5, 8'sd37, 8'sd37, -8'sd5
  };

  // Width that holds a sum of TAPS products of DATA_W x COEF_W bits exactly.
  function automatic int sop_width(int data_w, int coef_w, int taps);
    return data_w + coef_w + $clog2(taps);
  endfunction

endpackage
