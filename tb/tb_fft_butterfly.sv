// tb_fft_butterfly: streams random butterflies (BSD-significand A and B,
// Modified Booth W) with random gaps.  Inputs are applied between edges;
// the edge that samples an input with in_valid high must present A+BW and
// A-BW and raise out_valid (latency one clock), and out_valid must be low
// after an edge that sampled in_valid low.
module tb_fft_butterfly;
  import bsd_pkg::*;
  import tb_util_pkg::*;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0;
  logic in_valid = 0;
  always #5 clk = ~clk;

  bsd_fp_t a_re, a_im, b_re, b_im, sum_re, sum_im, dif_re, dif_im;
  mbe_fp_t w_re, w_im;
  logic out_valid, ovf, unf;

  fft_butterfly dut (.clk(clk), .rst_n(rst_n), .in_valid(in_valid),
                     .a_re(a_re), .a_im(a_im), .b_re(b_re), .b_im(b_im), .w_re(w_re), .w_im(w_im),
                     .out_valid(out_valid), .sum_re(sum_re), .sum_im(sum_im),
                     .dif_re(dif_re), .dif_im(dif_im), .ovf(ovf), .unf(unf));

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic real fv(bsd_fp_t x);
    return real'(bsd_int(64'(x.p), 64'(x.n), 24)) * pow2(int'(x.e) - 127 - 23);
  endfunction
  function automatic real wv(mbe_fp_t w);
    return real'(mbe_int(64'(w.wp), 64'(w.wn), 26)) * pow2(int'(w.e) - 127 - 23);
  endfunction
  function automatic bsd_fp_t rand_fp();
    bsd_fp_t r;
    logic [63:0] p, n;
    rand_bsd(p, n, 24);
    r.p = p[23:0]; r.n = n[23:0];
    r.e = 8'(110 + $urandom_range(30));
    return r;
  endfunction
  function automatic mbe_fp_t rand_w();
    mbe_fp_t r;
    logic [63:0] p, n;
    rand_mbe(p, n, 26);
    r.wp = p[25:0]; r.wn = n[25:0];
    r.e = 8'(124 + $urandom_range(3));
    return r;
  endfunction

  task automatic check(string what, real got, real ref_v, real tr);
    checks++;
    if (rabs(got - ref_v) > rabs(ref_v) * pow2(-23) + tr) begin
      failures++;
      if (failures < 5) $display("%s mismatch ref=%g got=%g", what, ref_v, got);
    end
  endtask

  real e_tr;

  initial begin
    real br, bi, wr, wi, ar, ai;
    repeat (3) @(posedge clk);
    rst_n <= 1;
    for (int k = 0; k < 3000; k++) begin
      a_re = rand_fp(); a_im = rand_fp(); b_re = rand_fp(); b_im = rand_fp();
      w_re = rand_w();  w_im = rand_w();
      in_valid = ($urandom_range(3) != 0);
      @(posedge clk);   // inputs sampled here
      #1;
      // the edge above captured these inputs; the registered results of
      // an accepted input are visible right after it
      checks++;
      if (out_valid != in_valid) failures++;
      if (in_valid) begin
        ar = fv(a_re); ai = fv(a_im); br = fv(b_re); bi = fv(b_im); wr = wv(w_re); wi = wv(w_im);
        e_tr = pow2(140 + 2 - 127 - 49 + 2);
        check("sum_re", fv(sum_re), ar + (br*wr - bi*wi), e_tr);
        check("sum_im", fv(sum_im), ai + (br*wi + bi*wr), e_tr);
        check("dif_re", fv(dif_re), ar - (br*wr - bi*wi), e_tr);
        check("dif_im", fv(dif_im), ai - (br*wi + bi*wr), e_tr);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
