// bsd_pkg: sizes and types shared by the floating-point FFT butterfly whose
// significands are kept in binary signed digit (BSD) form.
//
// A BSD number of W digits is carried as two W-bit vectors: posibits p and
// negabits n.  Digit i has the value p[i] - n[i], one of {-1, 0, +1}, and the
// number is sum_i (p[i] - n[i]) * 2^i.  Negating it costs only wiring: p and
// n swap places.  The sign of a floating-point number is folded into its
// digits, so no separate sign bit exists anywhere in the datapath.
//
// A twiddle significand in Modified Booth (MBE) form uses, per binary
// position, a magnitude flag (w+) and a sign flag (w-): 00 = 0, 01 = +1,
// 11 = -1.  Of every pair of positions (2j+1, 2j) at most one is non-zero.
//
// The default format follows IEEE 754 single precision: 8-bit biased
// exponent (bias 127) and a 24-bit significand including the hidden one.
package bsd_pkg;
  localparam int unsigned SIG_W  = 24;          // significand digits
  localparam int unsigned EXP_W  = 8;           // exponent bits
  localparam int unsigned BIAS   = 127;         // exponent bias
  localparam int unsigned MBE_W  = SIG_W + 2;   // MBE positions of a twiddle significand

  // A floating-point number with a normalised BSD significand:
  // value = (p - n) * 2^(e - BIAS - (SIG_W-1)).  e = 0 means zero.
  typedef struct packed {
    logic [EXP_W-1:0] e;
    logic [SIG_W-1:0] p;
    logic [SIG_W-1:0] n;
  } bsd_fp_t;

  // A floating-point twiddle factor with an MBE significand:
  // value = W * 2^(e - BIAS - (SIG_W-1)) with W = sum_i wp[i]*(wn[i] ? -1 : 1)*2^i.
  typedef struct packed {
    logic [EXP_W-1:0] e;
    logic [MBE_W-1:0] wp;
    logic [MBE_W-1:0] wn;
  } mbe_fp_t;
endpackage
