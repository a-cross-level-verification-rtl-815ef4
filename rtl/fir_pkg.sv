// fir_pkg: sizes, coefficients and reference arithmetic shared by the two
// timing-monitored FIR filters (fir_razor, fir_cbm) and their testbenches.
//
// The host filter is a 4-tap direct-form FIR with 8-bit unsigned samples and
// 8-bit unsigned coefficients. Each tap product is 16 bits wide, so the four
// product registers hold 4 x 16 = 64 flip-flops: these are the critical-path
// endpoints that the Razor version replaces with 64 modified Razor flip-flops.
// The 18-bit sum of the four products is truncated to its 16 most significant
// bits to give the 16-bit output. Tap count, widths and coefficients are this
// design's own choice; only the filter type, the count of 64 monitored paths and
// the 8-in/16-out pin budget come from the published characteristics of the
// augmented filter.
package fir_pkg;

  localparam int unsigned TAPS   = 4;
  localparam int unsigned DATA_W = 8;
  localparam int unsigned COEF_W = 8;
  localparam int unsigned PROD_W = DATA_W + COEF_W;          // 16
  localparam int unsigned SUM_W  = PROD_W + $clog2(TAPS);    // 18
  localparam int unsigned OUT_W  = 16;

  typedef logic [DATA_W-1:0] sample_t;
  typedef logic [COEF_W-1:0] coef_t;
  typedef logic [PROD_W-1:0] prod_t;
  typedef logic [OUT_W-1:0]  out_t;

  typedef coef_t coef_arr_t [TAPS];
  typedef prod_t prod_arr_t [TAPS];
  typedef sample_t tap_arr_t [TAPS];

  localparam coef_arr_t COEFS = '{8'd141, 8'd249, 8'd249, 8'd141};

  // Sum of the tap products, reduced to the output width (keep the MSBs).
  function automatic out_t fir_out(input prod_arr_t p);
    logic [SUM_W-1:0] s;
    s = '0;
    for (int i = 0; i < TAPS; i++) s += SUM_W'(p[i]);
    return s[SUM_W-1 -: OUT_W];
  endfunction

  // Product of one sample and one coefficient.
  function automatic prod_t fir_mul(input sample_t x, input coef_t c);
    return prod_t'(x) * prod_t'(c);
  endfunction

endpackage
