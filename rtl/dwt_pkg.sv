// dwt_pkg - shared types and constants of the two-stage db2 2-D DWT pipeline.
//
// The transform uses the 4-tap Daubechies (db2) analysis filters. The taps
// are held as signed 16-bit fixed-point numbers with FRAC=14 fractional bits:
//   h = (1+sqrt3, 3+sqrt3, 3-sqrt3, 1-sqrt3) / (4*sqrt2)
//     = 0.48296, 0.83652, 0.22414, -0.12941  ->  7913, 13705, 3672, -2120
//   g[n] = (-1)^n * h[3-n]                    -> -2120, -3672, 13705, -7913
// An output coefficient of either filter is y[k] = sum_i c[i] * x[2k+i],
// with the index taken modulo the line length (periodic extension).
// The filter family and the 16-bit word follow the design's description;
// the tap quantisation, the convolution alignment and the boundary rule are
// this implementation's choices.
package dwt_pkg;

  localparam int W     = 16;   // sample / coefficient word
  localparam int CW    = 16;   // filter tap word
  localparam int FRAC  = 14;   // fractional bits of the taps
  localparam int TAPS  = 4;    // db2 filter length (L)

  typedef logic signed [W-1:0]  sample_t;
  typedef logic signed [CW-1:0] tap_t;

  // Four samples of a filter window, index 0 is the oldest (x[2k]).
  typedef sample_t [TAPS-1:0] win_t;

  localparam tap_t H_TAP [TAPS] = '{16'sd7913, 16'sd13705, 16'sd3672, -16'sd2120};
  localparam tap_t G_TAP [TAPS] = '{-16'sd2120, -16'sd3672, 16'sd13705, -16'sd7913};

  // Sub-band code: bit 1 = horizontal filter (0 low, 1 high),
  //                bit 0 = vertical filter   (0 low, 1 high).
  typedef enum logic [1:0] {
    BAND_LL = 2'b00,
    BAND_LH = 2'b01,
    BAND_HL = 2'b10,
    BAND_HH = 2'b11
  } band_t;

  // Buffer 1 keeps the LL of level j (1 <= j < LEVELS) in a ring of its own
  // of img_w >> (j-1) words (two LL rows); rings follow each other from
  // address 0. Base of ring j: sum over i = 1 .. j-1 of (img_w >> (i-1)).
  function automatic int ll_base(int img_w, int j);
    int b = 0;
    for (int i = 1; i < j; i++) b += img_w >> (i - 1);
    return b;
  endfunction

  // Buffer 2 keeps the columns of level j (img_w >> (j-1) of them) in its own
  // region; base of region j: sum over i = 1 .. j-1 of (img_w >> (i-1)).
  function automatic int col_base(int img_w, int j);
    int b = 0;
    for (int i = 1; i < j; i++) b += img_w >> (i - 1);
    return b;
  endfunction

  // Round a FRAC-scaled sum to the nearest integer and saturate it to a word.
  function automatic sample_t round_sat(input logic signed [35:0] acc);
    logic signed [35:0] r;
    r = (acc + 36'sd8192) >>> FRAC;
    if (r > 36'sd32767)       return sample_t'(16'sh7fff);
    else if (r < -36'sd32768) return sample_t'(16'sh8000);
    else                      return sample_t'(r[W-1:0]);
  endfunction

endpackage
