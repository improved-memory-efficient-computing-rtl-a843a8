// Shared constants of the distributed-arithmetic (DA) DWT.
//
// The DWT is built from two DA FIR filters, a low-pass and a high-pass one.
// Each filter reads DA_BITS bit slices of its input samples per clock (the
// two-bit-parallel DA arrangement), looks the slices up in compressed
// look-up tables and accumulates the shifted partial sums.
//
// The sample and output widths (4 -> 9 bits low-pass, 6 -> 13 bits high-pass)
// are the widths of the synthesized single-level DWT. The filter taps are
// the four Daubechies-4 coefficients, scaled to integers so that every sum
// of a subset of them fits the LUT word: this choice of wavelet and scaling
// is this design's own.
package da_dwt_pkg;

  // Bit slices processed per clock (two LUT copies per filter).
  localparam int DA_BITS  = 2;
  localparam int DA_TAPS  = 4;

  // Low-pass filter: 4-bit samples, 5-bit LUT words, 9-bit output.
  localparam int LP_IN_W  = 4;
  localparam int LP_LUT_W = 5;
  localparam int LP_OUT_W = 9;

  // High-pass filter: 6-bit samples, 7-bit LUT words, 13-bit output.
  localparam int HP_IN_W  = 6;
  localparam int HP_LUT_W = 7;
  localparam int HP_OUT_W = 13;

  // Daubechies-4 analysis taps h[k] = (0.4830, 0.8365, 0.2241, -0.1294),
  // rounded after scaling by 8 (low-pass), and g[k] = (-1)^(k+1) h[3-k]
  // style high-pass taps (-0.1294, -0.2241, 0.8365, -0.4830) scaled by 64.
  typedef int coef4_t [DA_TAPS];
  localparam coef4_t LP_COEF = '{4, 7, 2, -1};
  localparam coef4_t HP_COEF = '{-8, -14, 54, -31};

endpackage
