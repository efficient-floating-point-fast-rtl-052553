// fft_butterfly: radix-2 floating-point FFT butterfly on BSD significands.
//
// For complex inputs A, B and twiddle W it produces A + B*W and A - B*W.
// Two fused dot product add units do all the work:
//   real FDPA: Bre*Wre + Bim*(-Wim) +- Are
//   imag FDPA: Bre*Wim + Bim*Wre    +- Aim
// The "plus" output of each unit is (A + BW); the "minus" output is
// (BW - A), negated by exchanging posibits and negabits to give (A - BW).
// -Wim is Wim's Booth form with the sign flag flipped at every non-zero
// position.  A and B arrive with BSD significands (bsd_fp_t), W with a
// Modified Booth significand (mbe_fp_t), as a twiddle store would hold it.
// The results are BSD-significand numbers in the same format as A and B,
// so they can feed a following butterfly directly.
//
// Timing: the arithmetic is one combinational path; the four results, the
// overflow/underflow flags and out_valid are registered, so results appear
// on the clock edge after in_valid is sampled high (latency 1, one new
// butterfly per cycle).  Synchronous reset, active low, clears out_valid and
// the result registers.  The register stage and its handshake are this
// implementation's choice.
module fft_butterfly
  import bsd_pkg::*;
(
  input  logic    clk,
  input  logic    rst_n,
  input  logic    in_valid,
  input  bsd_fp_t a_re, a_im,
  input  bsd_fp_t b_re, b_im,
  input  mbe_fp_t w_re, w_im,
  output logic    out_valid,
  output bsd_fp_t sum_re, sum_im,   // A + B*W
  output bsd_fp_t dif_re, dif_im,   // A - B*W
  output logic    ovf,
  output logic    unf
);
  logic [MBE_W-1:0] wim_neg_n;
  assign wim_neg_n = w_im.wp & ~w_im.wn;

  bsd_fp_t pl_re, mi_re, pl_im, mi_im;
  logic    ovf_re, unf_re, ovf_im, unf_im;

  fdpa #(.N(SIG_W), .EW(EXP_W), .BIAS(BIAS)) u_fdpa_re (
    .x_e(b_re.e),  .x_p(b_re.p),   .x_n(b_re.n),
    .w1_e(w_re.e), .w1_p(w_re.wp), .w1_n(w_re.wn),
    .y_e(b_im.e),  .y_p(b_im.p),   .y_n(b_im.n),
    .w2_e(w_im.e), .w2_p(w_im.wp), .w2_n(wim_neg_n),
    .a_e(a_re.e),  .a_p(a_re.p),   .a_n(a_re.n),
    .pl_e(pl_re.e), .pl_p(pl_re.p), .pl_n(pl_re.n),
    .mi_e(mi_re.e), .mi_p(mi_re.p), .mi_n(mi_re.n),
    .ovf(ovf_re), .unf(unf_re)
  );

  fdpa #(.N(SIG_W), .EW(EXP_W), .BIAS(BIAS)) u_fdpa_im (
    .x_e(b_re.e),  .x_p(b_re.p),   .x_n(b_re.n),
    .w1_e(w_im.e), .w1_p(w_im.wp), .w1_n(w_im.wn),
    .y_e(b_im.e),  .y_p(b_im.p),   .y_n(b_im.n),
    .w2_e(w_re.e), .w2_p(w_re.wp), .w2_n(w_re.wn),
    .a_e(a_im.e),  .a_p(a_im.p),   .a_n(a_im.n),
    .pl_e(pl_im.e), .pl_p(pl_im.p), .pl_n(pl_im.n),
    .mi_e(mi_im.e), .mi_p(mi_im.p), .mi_n(mi_im.n),
    .ovf(ovf_im), .unf(unf_im)
  );

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      out_valid <= 1'b0;
      sum_re    <= '0;
      sum_im    <= '0;
      dif_re    <= '0;
      dif_im    <= '0;
      ovf       <= 1'b0;
      unf       <= 1'b0;
    end else begin
      out_valid <= in_valid;
      if (in_valid) begin
        sum_re <= pl_re;
        sum_im <= pl_im;
        dif_re <= '{e: mi_re.e, p: mi_re.n, n: mi_re.p};
        dif_im <= '{e: mi_im.e, p: mi_im.n, n: mi_im.p};
        ovf    <= ovf_re | ovf_im;
        unf    <= unf_re | unf_im;
      end
    end
  end
endmodule
