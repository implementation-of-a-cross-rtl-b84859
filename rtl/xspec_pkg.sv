// xspec_pkg - constants and helper functions shared by the cross-spectrum
// analyzer.
//
// Holds the decimation-filter coefficients, the Blackman-Harris window
// coefficients and constant functions that build the window and FFT twiddle
// tables at elaboration time, so that no table has to be read from a file.
//
// FIR coefficients (FIR_COEF): 31-tap symmetric low-pass that follows a
// 5th-order CIC decimating by 5 and itself decimates by 2. Only the first 16
// taps are stored (h[t] = h[30-t]); FIR_COEF[15] is the centre tap. They were
// designed by weighted least squares (iteratively reweighted towards minimax)
// for a pass band 0..0.1875 and a stop band 0.3125..0.5 of the FIR input rate,
// with the pass-band target 1/H_CIC(f) so that the CIC droop is cancelled.
// Result: about 0.01 dB pass-band ripple and 72 dB alias rejection for the
// CIC+FIR pair, against the 0.1 dB / 60 dB requirement. They are scaled so
// that sum(h) = 171799, the integer nearest 2^17 * 4096/3125: the CIC DC gain
// 5^5 = 3125 times the FIR DC gain is 2^12 * 2^17 within 2 parts per million.
package xspec_pkg;

  localparam int FIR_TAPS   = 31;
  localparam int FIR_UNIQUE = 16;
  localparam int COEF_W     = 18;
  localparam int COEF_FRAC  = 17;
  localparam int CIC_R      = 5;
  localparam int CIC_N      = 5;
  localparam int CIC_GROW   = 12;   // ceil(CIC_N * log2(CIC_R)) = ceil(11.61)

  typedef logic signed [COEF_W-1:0] coef_t;
  localparam coef_t FIR_COEF [FIR_UNIQUE] = '{
    -18'sd251,   -18'sd13,    18'sd782,    18'sd51,
    -18'sd1884,  -18'sd150,   18'sd3879,   18'sd389,
    -18'sd7292,  -18'sd984,   18'sd13224,  18'sd2699,
    -18'sd25040, -18'sd10028, 18'sd59509,  18'sd102017
  };

  // 4-term minimum-sidelobe Blackman-Harris window (92 dB sidelobes).
  localparam real BH_A0 = 0.35875;
  localparam real BH_A1 = 0.48829;
  localparam real BH_A2 = 0.14128;
  localparam real BH_A3 = 0.01168;
  localparam real PI    = 3.14159265358979323846;

  // Periodic window value w(n) = a0 - a1 cos(2 pi n/N) + a2 cos(4 pi n/N)
  // - a3 cos(6 pi n/N) as an unsigned fraction with frac_bits bits.
  function automatic int unsigned bh_window_q(int n, int npts, int frac_bits);
    real x, w;
    x = 2.0 * PI * real'(n) / real'(npts);
    w = BH_A0 - BH_A1 * $cos(x) + BH_A2 * $cos(2.0 * x) - BH_A3 * $cos(3.0 * x);
    return int'($rtoi(w * real'((1 << frac_bits) - 1) + 0.5));
  endfunction

  // Twiddle factor exp(-j 2 pi m / npts) scaled by 2^frac_bits, rounded.
  function automatic int tw_cos_q(int m, int npts, int frac_bits);
    real x;
    x = 2.0 * PI * real'(m) / real'(npts);
    return $rtoi($floor($cos(x) * real'(1 << frac_bits) + 0.5));
  endfunction

  function automatic int tw_msin_q(int m, int npts, int frac_bits);
    real x;
    x = 2.0 * PI * real'(m) / real'(npts);
    return $rtoi($floor(-$sin(x) * real'(1 << frac_bits) + 0.5));
  endfunction

endpackage
