// fir_pkg: widths shared by the FIR filter and its arithmetic blocks.
// The 16-bit input sample, the 32-bit output and the 16 taps are the
// design's published sizes; the 16-bit coefficient width is this design's
// own choice (no coefficient width is given for the filter).
package fir_pkg;
  localparam int unsigned NTAPS_DEF = 16;  // taps of the filter
  localparam int unsigned XW_DEF    = 16;  // input sample width
  localparam int unsigned CW_DEF    = 16;  // coefficient width (chosen)
  localparam int unsigned YW_DEF    = 32;  // output width
endpackage
