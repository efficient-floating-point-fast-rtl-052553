// fp_to_bsd: converts an IEEE 754 single precision number into the
// butterfly's internal format, an exponent and a BSD significand.
//
// The 24-bit significand 1.f becomes the posibits of a positive number or
// the negabits of a negative one, so the sign is held by the digits.  The
// biased exponent passes unchanged.  Zeros and subnormals become zero
// (exponent 0, no non-zero digit); infinities and NaNs are not treated
// specially.  Purely combinational.
module fp_to_bsd
  import bsd_pkg::*;
(
  input  logic [31:0] f,
  output bsd_fp_t     r
);
  logic        sgn, nz;
  logic [23:0] mag;

  assign sgn = f[31];
  assign nz  = |f[30:23];
  assign mag = nz ? {1'b1, f[22:0]} : 24'd0;

  assign r.e = f[30:23];
  assign r.p = sgn ? '0 : mag;
  assign r.n = sgn ? mag : '0;
endmodule
