// mr_pkg: constants shared by the multirate convolution-with-pooling layer.
//
// The layer is a separable 2-D FIR followed by a stride-M decimator (pooling), rebuilt so that
// the decimator sits in front of the filter and every tap group becomes one time-varying weight.
// This package holds the design-example configuration: pooling factor M = 2 in both directions,
// L = 2 time-varying weights per direction (prototype order N = M*L = 4), a 28x28 input image
// (pooled to 14x14) and the separable edge-filter weights a = {-3.9, 0, 4, 0} used for both the
// horizontal and the vertical filter.
//
// The number formats are this design's choice: pixels are 8-bit unsigned, weights are 12-bit
// two's complement with 8 fraction bits, so -3.9 is stored as round(-3.9*256) = -998
// (-3.8984375) and 4 as 1024. All arithmetic after that is exact (full-width sums).
package mr_pkg;

  localparam int unsigned PIX_W     = 8;   // input pixel width (unsigned)
  localparam int unsigned COEF_W    = 12;  // weight width (signed)
  localparam int unsigned COEF_FRAC = 8;   // fraction bits of a weight
  localparam int unsigned POOL_M    = 2;   // pooling stride / decimation factor
  localparam int unsigned TV_L      = 2;   // time-varying weights per direction
  localparam int unsigned TAPS_N    = POOL_M * TV_L;
  localparam int unsigned IMG_W     = 28;  // input pixels per line
  localparam int unsigned IMG_H     = 28;  // input lines per frame

  typedef logic [TAPS_N-1:0][COEF_W-1:0] coef_vec_t;

  // Edge-filter weights, element j is a_j (horizontal) or a_1j (vertical).
  localparam logic signed [COEF_W-1:0] A_M3P9 = -12'sd998;  // -3.9
  localparam logic signed [COEF_W-1:0] A_P4   = 12'sd1024;  //  4.0
  localparam logic signed [COEF_W-1:0] A_ZERO = 12'sd0;
  localparam coef_vec_t H_COEF_EDGE = {A_ZERO, A_P4, A_ZERO, A_M3P9};  // a3 a2 a1 a0
  localparam coef_vec_t V_COEF_EDGE = {A_ZERO, A_P4, A_ZERO, A_M3P9};  // a13 a12 a11 a10

endpackage
