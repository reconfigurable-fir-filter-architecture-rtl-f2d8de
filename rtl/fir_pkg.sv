// fir_pkg: sizes and coefficient sets shared by the block FIR filters.
//
// The block size L = 8 is the one the design is built around. The filter
// length N, the sample and coefficient widths and the coefficient values are
// this design's own choices: N = 16 taps (two coefficient vectors of L words),
// 12-bit two's-complement samples (the resolution of common EEG recorders) and
// 12-bit two's-complement coefficients scaled by 2^11.
//
// Coefficient set 0 is the EEG low-pass filter: a Hamming-windowed ideal
// low-pass with cut-off fc = 32 Hz at a sample rate fs = 173.6 Hz,
//   h(n) = w(n) * 2(fc/fs) * sinc(2(fc/fs)(n - (N-1)/2)),
//   w(n) = 0.54 - 0.46 cos(2 pi n / (N-1)),  n = 0 .. N-1,
// normalised to unity gain at DC and rounded to round(h(n) * 2^11).
// Coefficient set 1 is a second filter of the same kind with fc = 14 Hz,
// there so that the reconfigurable filter has something to switch to.
package fir_pkg;

  localparam int unsigned L_DEF        = 8;   // block size
  localparam int unsigned N_DEF        = 16;  // filter length (taps)
  localparam int unsigned DATA_W_DEF   = 12;  // input sample width
  localparam int unsigned COEF_W_DEF   = 12;  // coefficient width
  localparam int unsigned NUM_SETS_DEF = 2;   // coefficient sets in the CSU
  localparam int unsigned COEF_FRAC    = 11;  // coefficient scale 2^COEF_FRAC

  // h(n) of the 32 Hz EEG low-pass (set 0) and of the 14 Hz low-pass (set 1),
  // scaled by 2^11.
  localparam int COEF_LP32 [N_DEF] =
    '{  5,  11,   2, -50, -86,  49, 390, 704, 704, 390,  49, -86, -50,   2,  11,   5};
  localparam int COEF_LP14 [N_DEF] =
    '{ -5,  -2,  10,  48, 117, 208, 297, 351, 351, 297, 208, 117,  48,  10,  -2,  -5};

  // COEF_ROM[set][n]: the contents of the coefficient storage unit.
  localparam int COEF_ROM [NUM_SETS_DEF][N_DEF] = '{
    '{  5,  11,   2, -50, -86,  49, 390, 704, 704, 390,  49, -86, -50,   2,  11,   5},
    '{ -5,  -2,  10,  48, 117, 208, 297, 351, 351, 297, 208, 117,  48,  10,  -2,  -5}
  };

endpackage
