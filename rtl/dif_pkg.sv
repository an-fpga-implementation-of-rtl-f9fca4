// dif_pkg: widths, filter coefficients and control types shared by the
// digital IF processor.
//
// The processor takes an 8-bit real signal sampled at Fs = 200 MHz, delivered
// as two 100 MHz streams, and produces a 100 MHz complex signal: FS/4 down
// conversion, a 63-tap lowpass split into two polyphase branches (32 even
// taps on the real branch, 31 odd taps on the imaginary branch) and an FS/4
// up (or down) conversion at the output rate.
//
// Widths: 8-bit input samples, 10-bit coefficients and an 8-bit output path
// (the accumulator divided by 2^11, rounded toward zero) are the numbers the
// design is built around.
//
// Coefficients: the design calls for a 63-tap lowpass whose taps are scaled
// so the largest is 511 and then truncated toward zero to 10 bits; the even
// taps h[0], h[2], .., h[62] form the real branch and the odd taps
// h[1], .., h[61] the imaginary branch. The default taps below are this
// design's own lowpass of that shape:
//   h[n]  = w[n] * sin(2*pi*fc*k) / (pi*k),  k = n - 31 (2*fc at k = 0),
//   w[n]  = 0.54 - 0.46*cos(2*pi*n/62)       (Hamming window),
//   fc    = 1/8 of the input rate (25 MHz at Fs = 200 MHz),
//   q[n]  = trunc(511 * h[n] / max|h|).
// Every fourth tap of this prototype is zero, so every second tap of the
// imaginary branch is zero. Replace REAL_COEFS / IMAG_COEFS (or override the
// filter parameters) to use a different prototype.
package dif_pkg;

  localparam int unsigned IN_W       = 8;   // ADC sample width
  localparam int unsigned COEF_W     = 10;  // coefficient width
  localparam int unsigned OUT_W      = 8;   // filter / output sample width
  localparam int unsigned OUT_SHIFT  = 11;  // accumulator / 2048 for 8-bit out
  localparam int unsigned REAL_TAPS  = 32;
  localparam int unsigned IMAG_TAPS  = 31;

  typedef logic signed [COEF_W-1:0] coef_t;

  localparam coef_t REAL_COEFS [REAL_TAPS] = '{
    -1, -1, 1, 2, -4, -6, 9, 12, -17, -23, 31, 41, -58, -86, 150, 458,
    458, 150, -86, -58, 41, 31, -23, -17, 12, 9, -6, -4, 2, 1, -1, -1
  };

  localparam coef_t IMAG_COEFS [IMAG_TAPS] = '{
    -1, 0, 3, 0, -7, 0, 15, 0, -28, 0, 50, 0, -99, 0, 322, 511,
    322, 0, -99, 0, 50, 0, -28, 0, 15, 0, -7, 0, 3, 0, -1
  };

  // Phase of the four-state controller (it counts 00, 01, 10, 11, 00, ..).
  typedef enum logic [1:0] {
    PH0 = 2'b00,
    PH1 = 2'b01,
    PH2 = 2'b10,
    PH3 = 2'b11
  } phase_e;

  // Control bits the controller hands to the datapath every cycle.
  typedef struct packed {
    logic neginput;  // 1: real branch passes, imaginary branch is negated
    logic swap;      // 1: exchange real and imaginary before the output negators
    logic negimag;   // 1: negate the imaginary output
    logic negreal;   // 1: negate the real output
  } ctrl_t;

endpackage
