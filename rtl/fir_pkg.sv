// fir_pkg -- word formats shared by the reconfigurable FIR filter.
//
// Samples and coefficients are 16-bit two's-complement Q1.15 numbers, each
// tap product is quantized back to 16 bits (Q1.15) and the filter output is
// 24 bits wide, as the filter specification gives. The 75-tap default is the
// equi-ripple filter used in the power/quality trade-off study. The largest
// decision-window length (MCSD_M_MAX) is this design's own choice.
package fir_pkg;
  localparam int unsigned DATA_W = 16;  // sample and coefficient width
  localparam int unsigned FRAC_W = 15;  // fractional bits of a sample/coefficient
  localparam int unsigned PROD_W = 16;  // quantized product width
  localparam int unsigned OUT_W  = 24;  // filter output width
  localparam int unsigned N_TAPS = 75;  // number of taps (order N = TAPS-1)
  localparam int unsigned MCSD_M_MAX = 16;  // largest MCSD window length supported
  localparam int unsigned TH_W   = $clog2(DATA_W);    // threshold exponent width
  localparam int unsigned MCSD_M_W = $clog2(MCSD_M_MAX + 1); // window length width

  typedef logic signed [DATA_W-1:0] sample_t;
  typedef logic signed [PROD_W-1:0] prod_t;
  typedef logic signed [OUT_W-1:0]  acc_t;
endpackage
