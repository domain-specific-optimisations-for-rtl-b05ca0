// dso_pkg: types and constants shared by the SIFT and image-filter datapaths.
//
// Everything is integer arithmetic: pixels are 8-bit unsigned, difference-of-
// Gaussian values 9-bit signed, gradient magnitudes 9-bit unsigned and angles
// 8-bit unsigned in units of 1/256 of a turn.
//
// The Gaussian tap table below holds, for kernel sizes 3 and 5 and up to five
// scales, the 1-D taps
//     g_s[i] = round(256 * exp(-(i-r)^2 / (2*sigma_s^2)) / sum_j exp(...)),
// r = K/2, with the centre tap corrected so that the taps sum to exactly 256,
// and sigma_s = 2^(s/3), i.e. three scale steps per doubling of sigma as in
// the usual SIFT schedule, started at sigma = 1 so that all scales stay
// distinct within a 3x3 kernel (this design's choice; sigma starting at 1.6
// makes the 3x3 taps of the upper scales round to the same values).
// The 2-D weight of tap (i,j) is g_s[i]*g_s[j].
package dso_pkg;

  localparam int PIX_W  = 8;   // grayscale pixel
  localparam int DOG_W  = 9;   // signed DoG value
  localparam int MAG_W  = 9;   // gradient magnitude
  localparam int ANG_W  = 8;   // angle, 256 units per turn
  localparam int COORD_W = 12; // pixel coordinate

  // A detected keypoint: octave-local coordinates, octave and DoG layer.
  typedef struct packed {
    logic [1:0]         octave;
    logic [1:0]         layer;
    logic [COORD_W-1:0] y;
    logic [COORD_W-1:0] x;
  } keypoint_t;

  typedef enum logic [1:0] {
    FILT_BOX   = 2'd0,
    FILT_GAUSS = 2'd1,
    FILT_SOBEL = 2'd2
  } filt_mode_t;

  // 1-D Gaussian taps, 256 = 1.0, for (K=3|5, SCALES=4|5, scale, tap).
  function automatic int gauss_tap(int k, int scales, int s, int i);
    int t3_4 [4][3] = '{'{70,116,70}, '{76,104,76}, '{80,96,80}, '{82,92,82}};
    int t3_5 [5][3] = '{'{70,116,70}, '{76,104,76}, '{80,96,80}, '{82,92,82}, '{83,90,83}};
    int t5_4 [4][5] = '{'{14,63,102,63,14}, '{24,62,84,62,24}, '{33,59,72,59,33},
                        '{39,57,64,57,39}};
    int t5_5 [5][5] = '{'{14,63,102,63,14}, '{24,62,84,62,24}, '{33,59,72,59,33},
                        '{39,57,64,57,39}, '{43,55,60,55,43}};
    if (k == 3 && scales == 4) return t3_4[s][i];
    if (k == 3) return t3_5[s][i];
    if (scales == 4) return t5_4[s][i];
    return t5_5[s][i];
  endfunction

  // CORDIC arctangent table: round(atan(2^-i) * 65536 / (2*pi)).
  function automatic int cordic_atan(int i);
    int t [16] = '{8192, 4836, 2555, 1297, 651, 326, 163, 81, 41, 20, 10, 5, 3, 1, 1, 0};
    return t[i];
  endfunction

  // Gaussian window weight across the 16-sample keypoint window:
  // round(255 * exp(-(i-7.5)^2 / 128)), i.e. sigma = 8 samples.
  function automatic int win_weight(int i);
    int t [16] = '{164, 183, 201, 218, 232, 243, 251, 255,
                   255, 251, 243, 232, 218, 201, 183, 164};
    return t[i];
  endfunction

  // Binomial coefficient C(n, i) (0 outside 0..n), for filter kernels.
  function automatic longint binom(int n, int i);
    longint c = 1;
    if (i < 0 || i > n || n < 0) return 0;
    for (int j = 0; j < i; j++) c = c * longint'(n - j) / longint'(j + 1);
    return c;
  endfunction

endpackage
