// fft_bfly_top: the floating-point FFT butterfly coprocessor and, beside
// it, the 8x8 Modified Booth / Wallace tree multiplier.
//
// Butterfly side: A, B and W arrive as IEEE 754 single precision numbers.
// A and B are converted to the internal format (exponent plus BSD
// significand with the sign in the digits); W's significand is recoded
// into Modified Booth form, as a twiddle store would hold it.  The
// butterfly returns A + B*W and A - B*W with BSD significands one clock
// after in_valid (see fft_butterfly).  The value of a result r is
// (r.p - r.n) * 2^(r.e - 127 - 23), zero when r.e is 0.
//
// Multiplier side: mul_x times mul_y (8-bit two's complement) appears on
// mul_product one clock later.  The two sides share only the clock.
module fft_bfly_top
  import bsd_pkg::*;
(
  input  logic        clk,
  input  logic        rst_n,
  // butterfly
  input  logic        in_valid,
  input  logic [31:0] a_re, a_im,
  input  logic [31:0] b_re, b_im,
  input  logic [31:0] w_re, w_im,
  output logic        out_valid,
  output bsd_fp_t     sum_re, sum_im,
  output bsd_fp_t     dif_re, dif_im,
  output logic        ovf,
  output logic        unf,
  // Booth / Wallace multiplier
  input  logic [7:0]  mul_x,
  input  logic [7:0]  mul_y,
  output logic [15:0] mul_product
);
  bsd_fp_t ar, ai, br, bi;
  mbe_fp_t wr, wi;

  fp_to_bsd u_cv_ar (.f(a_re), .r(ar));
  fp_to_bsd u_cv_ai (.f(a_im), .r(ai));
  fp_to_bsd u_cv_br (.f(b_re), .r(br));
  fp_to_bsd u_cv_bi (.f(b_im), .r(bi));

  assign wr.e = w_re[30:23];
  assign wi.e = w_im[30:23];
  booth_recoder #(.N(SIG_W)) u_rc_wr (
    .m((|w_re[30:23]) ? {1'b1, w_re[22:0]} : 24'd0), .sign(w_re[31]),
    .wp(wr.wp), .wn(wr.wn)
  );
  booth_recoder #(.N(SIG_W)) u_rc_wi (
    .m((|w_im[30:23]) ? {1'b1, w_im[22:0]} : 24'd0), .sign(w_im[31]),
    .wp(wi.wp), .wn(wi.wn)
  );

  fft_butterfly u_bfly (
    .clk, .rst_n, .in_valid,
    .a_re(ar), .a_im(ai), .b_re(br), .b_im(bi), .w_re(wr), .w_im(wi),
    .out_valid, .sum_re, .sum_im, .dif_re, .dif_im, .ovf, .unf
  );

  mbe_wallace_mult u_mult (
    .clock(clk), .x(mul_x), .y(mul_y), .product(mul_product)
  );
endmodule
