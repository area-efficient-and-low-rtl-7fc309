// decim_pkg: constants shared by the decimation filter chain.
//
// The chain takes a 1-bit oversampled stream and lowers its rate by 128 in four
// steps: a 4th-order sinc decimating by 8, a 3rd-order sinc decimating by 4 and
// two half-band FIR filters decimating by 2 each. The decimation factors and
// sinc orders are those of the published design; the word widths, the
// half-band lengths and their coefficients are this design's own choices.
//
// Half-band coefficients are integers scaled by 2**COEF_FRAC. A half-band
// filter of length 4K-1 has a centre tap of exactly 1/2, zero taps at every
// other even offset from the centre, and K distinct non-zero taps at the odd
// offsets +-1, +-3, ... +-(2K-1). Only those K taps are stored, nearest the
// centre first. They come from an equiripple (Parks-McClellan) design of a
// length-2K type-II filter g with a single passband 0..2*fp/fs, interleaved as
// h[2n] = g[n]/2, h[2K-1] = 1/2, then rounded to COEF_FRAC fractional bits:
//   HB1: fs = 64 kHz in, passband 0..7 kHz, stopband 25..32 kHz, K = 4 (15 taps),
//        stopband attenuation after rounding 82 dB, passband ripple 0.0013 dB.
//   HB2: fs = 32 kHz in, passband 0..6.5 kHz, stopband 9.5..16 kHz, K = 13 (51 taps),
//        stopband attenuation after rounding 81 dB, passband ripple 0.0014 dB.
// HB1 has the wide transition band, HB2 the sharp one, as in the published
// design; the sample rates assume a 2.048 MHz modulator stream (16 kHz out).
package decim_pkg;

  // Overall structure
  localparam int unsigned CIC1_M = 8;   // first sinc decimation factor
  localparam int unsigned CIC1_L = 4;   // first sinc order
  localparam int unsigned CIC2_M = 4;   // second sinc decimation factor
  localparam int unsigned CIC2_L = 3;   // second sinc order

  // Word widths
  localparam int unsigned BIT_W  = 2;   // 1-bit stream mapped to +1 / -1
  localparam int unsigned DATA_W = 20;  // half-band input and output width

  // Half-band coefficients
  localparam int unsigned COEF_FRAC = 18;

  localparam int unsigned HB1_K = 4;
  localparam int HB1_COEFS [HB1_K] = '{79676, -18159, 4756, -747};

  localparam int unsigned HB2_K = 13;
  localparam int HB2_COEFS [HB2_K] = '{83022, -26573, 14691, -9266, 6086, -4009,
                                       2591, -1618, 961, -533, 268, -117, 42};


endpackage
