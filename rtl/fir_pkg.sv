// fir_pkg: constants shared by the three-parallel FFA FIR filter.
//
// The default sample and coefficient widths are 8 bits, matching the 8x8
// Vedic multiplier the filter is built around. The tap count is this
// design's own choice (the filter length is a free parameter of the
// algorithm); it must be a multiple of the parallelism L = 3.
package fir_pkg;
  localparam int unsigned L          = 3;   // block size of the fast FIR algorithm
  localparam int unsigned DEF_DATA_W = 8;   // unsigned input sample width
  localparam int unsigned DEF_COEF_W = 8;   // unsigned coefficient width
  localparam int unsigned DEF_TAPS   = 24;  // filter length N
endpackage
