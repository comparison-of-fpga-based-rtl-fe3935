// fir_pkg: constants shared by both 6-tap low-pass FIR filters.
//
// The filter is a 6th-order (6-coefficient) symmetric low-pass FIR with
// coefficients 0.01, 0.064, 0.443, 0.443, 0.064, 0.01, approximated for
// hardware as multiples of 1/256: 4, 16, 114, 114, 16, 4 (0.015625, 0.0625,
// 0.4453125). Samples and outputs are 16-bit two's-complement words with
// 8 fraction bits (Q8.8), so 1.0 is 16'h0100.
//
// The coefficient values and their 8-bit fractional encoding follow the
// source design; signed Q8.8 samples are this design's reading of its
// 16-bit ports.
package fir_pkg;

  // Number of filter coefficients (taps).
  localparam int N_TAPS = 6;
  // Fraction bits of a coefficient word; also the right shift that brings
  // a product back to the Q8.8 sample scale.
  localparam int COEF_W = 8;
  localparam int FRAC_W = 8;
  // Address width of the convolution filter's decoder (3:8).
  localparam int ADDR_W = 3;

  typedef logic [COEF_W-1:0] coef_t;

  // b(k) * 256, k = 0 .. 5.
  localparam coef_t COEFS [N_TAPS] = '{8'd4, 8'd16, 8'd114, 8'd114, 8'd16, 8'd4};

endpackage
