// src_coeffs_pkg - word widths and filter coefficient tables of the 13/15
// IFIR fractional decimator.
//
// Each table is the impulse response of a sharpened, rounded basis filter,
// Sh{H_r}(z) = 3 z^-D H_r(z)^2 - 2 H_r(z)^3 with D the group delay of H_r,
// re-quantised to signed 16-bit integers in Q1.15 (unity DC gain = 32768).
// The basis filters H are equiripple (Parks-McClellan) low-pass designs,
// rounded as h_r = 2^-12 * round(h / 2^-12) before sharpening.
//
//   I_*  interpolator filter I(z), runs ahead of the decimate-by-5 (M1)
//   G_*  model filter G(z), runs ahead of the decimate-by-3 (M2)
//   *_LOW   fractional stage placed after the integer decimator (low rate)
//   *_HIGH  fractional stage placed ahead of the integer decimator (high rate)
//   *_EX    smaller worked example of the same method: basis filters rounded
//           with r = 2^-8 and sharpened as H^3 instead of 3H^2 - 2H^3
//
// Band edges (normalised to Nyquist) follow the specification tables of the
// design: I_LOW pass 0.0492 / stop 0.3333, G_LOW pass 0.2460 / stop 0.3333,
// I_HIGH pass 0.00019 / stop 0.3333, G_HIGH pass 0.00095 / stop 0.3333.
// Lengths follow the polyphase sizes of the design (83 and 277 taps at the
// low rate, 67 and 67 at the high rate). The coefficient values themselves
// are this design's own: basis lengths 29/93 (low) and 23/23 (high), the
// 85-tap low-rate interpolator trimmed by its outermost (zero) tap at each end.
// The example set uses pass 0.0025 / stop 0.07 for the overall filter, so
// I_EX pass 0.0025 / stop 0.33 (52-tap basis, order 51) and G_EX pass 0.0125 /
// stop 0.35 (13-tap basis, order 12), each cubed (154 and 37 taps).
// The 16-bit coefficient word limits stop-band attenuation to about 67-78 dB.
package src_coeffs_pkg;

  parameter int IN_W   = 16;  // input sample and stage-to-stage word
  parameter int COEF_W = 16;  // coefficient word
  parameter int OUT_W  = 34;  // full-precision filter output word

  // Which coefficient set a fractional decimator is built with.
  typedef enum logic [1:0] {
    SRC_HIGH_RATE  = 2'd0,    // ahead of the integer decimator, 67 / 67 taps
    SRC_LOW_RATE   = 2'd1,    // after the integer decimator, 83 / 277 taps
    SRC_EXAMPLE_R8 = 2'd2     // r = 2^-8, cube sharpening, 154 / 37 taps
  } src_config_e;

  parameter int I_LOW_N = 83;
  parameter int I_LOW [I_LOW_N] = '{0, 0, 0, 0, 0, 0, 0, 0, 0, 0, 0, 0, 0, 0, -1, -2, -5, -8, -12, -14, -12, -3, 17, 49, 87, 121, 133, 101, 10, -146, -346, -543, -660, -611, -317, 267, 1125, 2174, 3271, 4237, 4901, 5137, 4901, 4237, 3271, 2174, 1125, 267, -317, -611, -660, -543, -346, -146, 10, 101, 133, 121, 87, 49, 17, -3, -12, -14, -12, -8, -5, -2, -1, 0, 0, 0, 0, 0, 0, 0, 0, 0, 0, 0, 0, 0, 0};
  parameter int G_LOW_N = 277;
  parameter int G_LOW [G_LOW_N] = '{0, 0, 0, 0, 0, 0, 0, 0, 0, 0, 0, 0, 0, 0, 0, 0, 0, 0, 0, 0, 0, 0, 0, 0, 0, 0, 0, 0, 0, 0, 0, 0, 0, 0, 0, 0, 0, 0, 0, 0, 0, 0, 0, 0, 0, 0, 0, 0, 0, 0, 0, 0, -1, -1, 0, 1, 1, 1, 0, -1, -2, -2, 0, 3, 4, 2, -2, -5, -6, -2, 5, 9, 7, -1, -10, -13, -7, 6, 17, 18, 5, -15, -27, -20, 3, 28, 37, 19, -18, -47, -45, -8, 41, 68, 46, -14, -74, -87, -35, 53, 113, 96, 3, -107, -152, -86, 56, 176, 179, 44, -144, -250, -179, 41, 262, 315, 132, -181, -403, -348, -14, 387, 554, 318, -211, -676, -700, -171, 618, 1105, 822, -232, -1464, -1938, -903, 1711, 5120, 7999, 9123, 7999, 5120, 1711, -903, -1938, -1464, -232, 822, 1105, 618, -171, -700, -676, -211, 318, 554, 387, -14, -348, -403, -181, 132, 315, 262, 41, -179, -250, -144, 44, 179, 176, 56, -86, -152, -107, 3, 96, 113, 53, -35, -87, -74, -14, 46, 68, 41, -8, -45, -47, -18, 19, 37, 28, 3, -20, -27, -15, 5, 18, 17, 6, -7, -13, -10, -1, 7, 9, 5, -2, -6, -5, -2, 2, 4, 3, 0, -2, -2, -1, 0, 1, 1, 1, 0, -1, -1, 0, 0, 0, 0, 0, 0, 0, 0, 0, 0, 0, 0, 0, 0, 0, 0, 0, 0, 0, 0, 0, 0, 0, 0, 0, 0, 0, 0, 0, 0, 0, 0, 0, 0, 0, 0, 0, 0, 0, 0, 0, 0, 0, 0, 0, 0, 0, 0, 0, 0, 0, 0};
  parameter int I_HIGH_N = 67;
  parameter int I_HIGH [I_HIGH_N] = '{0, 0, 0, 0, 0, 0, 0, 0, 0, 0, -1, -2, -4, -8, -15, -27, -46, -73, -108, -149, -189, -214, -205, -139, 12, 267, 636, 1114, 1674, 2267, 2831, 3298, 3607, 3715, 3607, 3298, 2831, 2267, 1674, 1114, 636, 267, 12, -139, -205, -214, -189, -149, -108, -73, -46, -27, -15, -8, -4, -2, -1, 0, 0, 0, 0, 0, 0, 0, 0, 0, 0};
  parameter int G_HIGH_N = 67;
  parameter int G_HIGH [G_HIGH_N] = '{0, 0, 0, 0, 0, 0, 0, 0, 0, 0, -1, -2, -4, -8, -15, -27, -46, -73, -108, -149, -189, -214, -205, -139, 12, 267, 636, 1114, 1674, 2267, 2831, 3298, 3607, 3715, 3607, 3298, 2831, 2267, 1674, 1114, 636, 267, 12, -139, -205, -214, -189, -149, -108, -73, -46, -27, -15, -8, -4, -2, -1, 0, 0, 0, 0, 0, 0, 0, 0, 0, 0};
  parameter int I_EX_N = 154;
  parameter int I_EX [I_EX_N] = '{0, 0, 0, 0, 0, 0, 0, 0, 0, 0, 0, 0, 0, 0, 0, 0, 0, 0, 0, 0, 0, 0, 0, 0, 0, 0, 0, 0, 0, 0, 0, 0, 0, 0, 0, 0, 0, 0, 0, 0, 0, 0, 1, 1, 2, 4, 6, 7, 9, 9, 8, 5, -3, -15, -33, -56, -86, -119, -153, -184, -207, -214, -197, -149, -62, 69, 247, 472, 739, 1040, 1361, 1687, 1998, 2277, 2504, 2666, 2749, 2749, 2666, 2504, 2277, 1998, 1687, 1361, 1040, 739, 472, 247, 69, -62, -149, -197, -214, -207, -184, -153, -119, -86, -56, -33, -15, -3, 5, 8, 9, 9, 7, 6, 4, 2, 1, 1, 0, 0, 0, 0, 0, 0, 0, 0, 0, 0, 0, 0, 0, 0, 0, 0, 0, 0, 0, 0, 0, 0, 0, 0, 0, 0, 0, 0, 0, 0, 0, 0, 0, 0, 0, 0, 0, 0, 0, 0, 0, 0};
  parameter int G_EX_N = 37;
  parameter int G_EX [G_EX_N] = '{0, 0, 1, 2, 7, 18, 41, 88, 170, 303, 502, 775, 1120, 1523, 1951, 2362, 2704, 2931, 3011, 2931, 2704, 2362, 1951, 1523, 1120, 775, 502, 303, 170, 88, 41, 18, 7, 2, 1, 0, 0};

endpackage
