// tb_fft_bfly_top: end-to-end test of the whole design at its default
// size.  Random IEEE 754 single precision butterflies stream through the
// top with random gaps; every result (A+BW, A-BW, real and imaginary) is
// compared one clock later with a double precision reference, the Booth /
// Wallace multiplier beside it is checked on every clock, and each
// mechanism of the datapath is counted and must occur at least once:
// rounding up, rounding down, a large normalisation shift after
// cancellation, an operand aligned out of the window, a zero operand,
// an exact zero result, overflow, underflow, back-to-back inputs and gaps.
module tb_fft_bfly_top;
  import bsd_pkg::*;
  import tb_util_pkg::*;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0;
  logic in_valid = 0;
  always #5 clk = ~clk;

  logic [31:0] a_re, a_im, b_re, b_im, w_re, w_im;
  bsd_fp_t sum_re, sum_im, dif_re, dif_im;
  logic out_valid, ovf, unf;
  logic [7:0] mul_x, mul_y;
  logic [15:0] mul_product;

  fft_bfly_top dut (.clk(clk), .rst_n(rst_n), .in_valid(in_valid),
                    .a_re(a_re), .a_im(a_im), .b_re(b_re), .b_im(b_im), .w_re(w_re), .w_im(w_im),
                    .out_valid(out_valid), .sum_re(sum_re), .sum_im(sum_im),
                    .dif_re(dif_re), .dif_im(dif_im), .ovf(ovf), .unf(unf),
                    .mul_x(mul_x), .mul_y(mul_y), .mul_product(mul_product));

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // value of an IEEE single from its fields (zero/subnormal read as zero)
  function automatic real sv(logic [31:0] f);
    real m;
    if (f[30:23] == 0) return 0.0;
    m = (1.0 + real'(f[22:0]) * pow2(-23)) * pow2(int'(f[30:23]) - 127);
    return f[31] ? -m : m;
  endfunction
  function automatic real fv(bsd_fp_t x);
    return real'(bsd_int(64'(x.p), 64'(x.n), 24)) * pow2(int'(x.e) - 127 - 23);
  endfunction
  function automatic logic [31:0] rand_single(int elo, int ehi);
    return {1'($urandom), 8'(elo + int'($urandom_range(ehi - elo))), 23'($urandom)};
  endfunction

  // mechanism counters
  int n_rnd_up = 0, n_rnd_dn = 0, n_bigshift = 0, n_drop = 0, n_zero_op = 0;
  int n_zero_res = 0, n_ovf = 0, n_unf = 0, n_b2b = 0, n_gap = 0, n_ops = 0;
  int n_sticky = 0, n_lead = 0;

  always @(posedge clk) if (rst_n && in_valid) begin
    // adder internals of the real "plus" path
    if (dut.u_bfly.u_fdpa_re.u_add_plus.inc) n_rnd_up++;
    else if (dut.u_bfly.u_fdpa_re.u_add_plus.rnd | dut.u_bfly.u_fdpa_re.u_add_plus.stk) n_rnd_dn++;
    if (!dut.u_bfly.u_fdpa_re.u_add_plus.allz && dut.u_bfly.u_fdpa_re.u_add_plus.lz > 20) n_bigshift++;
    if (dut.u_bfly.u_fdpa_re.u_add_plus.emax - dut.u_bfly.u_fdpa_re.u_add_plus.ea >= 57 &&
        a_re[30:23] != 0) n_drop++;
    if (|{dut.u_bfly.u_fdpa_re.u_add_plus.xk, dut.u_bfly.u_fdpa_re.u_add_plus.yk,
          dut.u_bfly.u_fdpa_re.u_add_plus.ak}) n_sticky++;
    if (!dut.u_bfly.u_fdpa_re.u_add_plus.allz) begin
      int top = 63;
      while (!dut.u_bfly.u_fdpa_re.u_add_plus.nz[top]) top--;
      if (int'(dut.u_bfly.u_fdpa_re.u_add_plus.sh) > 63 - top) n_lead++;
    end
  end

  task automatic check(string what, bsd_fp_t r, real ref_v, real tr, bit flagged);
    real got = fv(r);
    checks++;
    if (flagged) return;   // overflow/underflow cases are checked separately
    if (rabs(got - ref_v) > rabs(ref_v) * pow2(-23) + tr) begin
      failures++;
      if (failures < 8) $display("%s mismatch ref=%g got=%g", what, ref_v, got);
    end
    if (ref_v == 0.0) n_zero_res++;
  endtask

  real  e_tr;
  logic last_valid = 0;

  initial begin
    real ar, ai, br, bi, wr, wi;
    int kind, eb, ew, ea;
    mul_x = 0; mul_y = 0;
    repeat (3) @(posedge clk);
    rst_n <= 1;
    for (int k = 0; k < 4000; k++) begin
      kind = int'($urandom_range(19));
      // operands of ordinary size
      a_re = rand_single(110, 140); a_im = rand_single(110, 140);
      b_re = rand_single(110, 140); b_im = rand_single(110, 140);
      w_re = rand_single(120, 127); w_im = rand_single(120, 127);
      if (kind == 0) begin   // exact cancellation: A = B*W with W = 1, B real
        logic [31:0] t;
        t = rand_single(110, 140);
        a_re = t; b_re = t; a_im = 32'd0; b_im = 32'd0;
        w_re = 32'h3f800000; w_im = 32'd0;
      end
      if (kind == 1) begin a_re = rand_single(250, 254); b_re = rand_single(250, 254);
                           b_im = 32'd0; w_re = rand_single(200, 254); end            // overflow
      if (kind == 2) begin a_re = 32'd0; a_im = 32'd0; b_re = rand_single(1, 20);
                           b_im = rand_single(1, 20); w_re = rand_single(1, 20);
                           w_im = rand_single(1, 20); end                               // underflow
      if (kind == 3) begin a_re = rand_single(190, 200); a_im = rand_single(190, 200); end // B*W aligned out
      if (kind == 4) begin b_re = 32'd0; w_im = 32'h0; end                             // zero operands
      if (kind == 5) begin   // near cancellation: A close to -B*W
        logic [31:0] t;
        t = rand_single(110, 140);
        a_re = {~t[31], t[30:1], ~t[0]}; b_re = t; b_im = 32'd0;
        w_re = 32'h3f800000; w_im = 32'd0;
      end
      in_valid = ($urandom_range(4) != 0);
      mul_x = 8'($urandom); mul_y = 8'($urandom);
      @(posedge clk);
      #1;
      // the edge above sampled these inputs; registered results of an
      // accepted input are visible right after it (latency one clock)
      checks++;
      if (mul_product != 16'($signed(mul_x) * $signed(mul_y))) failures++;
      checks++;
      if (out_valid != in_valid) failures++;
      if (in_valid && last_valid) n_b2b++;
      if (!in_valid) n_gap++;
      last_valid = in_valid;
      if (in_valid) begin
        logic flagged;
        n_ops++;
        if (b_re[30:23] == 0 || w_im[30:23] == 0) n_zero_op++;
        ar = sv(a_re); ai = sv(a_im); br = sv(b_re); bi = sv(b_im); wr = sv(w_re); wi = sv(w_im);
        eb = (b_re[30:23] > b_im[30:23]) ? int'(b_re[30:23]) : int'(b_im[30:23]);
        ew = (w_re[30:23] > w_im[30:23]) ? int'(w_re[30:23]) : int'(w_im[30:23]);
        ea = (a_re[30:23] > a_im[30:23]) ? int'(a_re[30:23]) : int'(a_im[30:23]);
        e_tr = pow2(((eb + ew - 127 + 1 > ea) ? eb + ew - 127 + 1 : ea) - 127 - 49 + 3);
        flagged = ovf | unf;
        if (ovf) n_ovf++;
        if (unf) n_unf++;
        checks++;
        if ((kind == 1 && !ovf) || (kind == 2 && !unf)) failures++;
        check("sum_re", sum_re, ar + (br*wr - bi*wi), e_tr, flagged);
        check("sum_im", sum_im, ai + (br*wi + bi*wr), e_tr, flagged);
        check("dif_re", dif_re, ar - (br*wr - bi*wi), e_tr, flagged);
        check("dif_im", dif_im, ai - (br*wi + bi*wr), e_tr, flagged);
      end
    end
    @(posedge clk); #1;
    $display("ops=%0d round_up=%0d round_down=%0d big_norm_shift=%0d aligned_out=%0d zero_operand=%0d",
             n_ops, n_rnd_up, n_rnd_dn, n_bigshift, n_drop, n_zero_op);
    $display("zero_result=%0d overflow=%0d underflow=%0d back_to_back=%0d gaps=%0d",
             n_zero_res, n_ovf, n_unf, n_b2b, n_gap);
    $display("sticky_digit=%0d insignificant_leading_digits=%0d", n_sticky, n_lead);
    checks++; if (n_rnd_up == 0)   failures++;
    checks++; if (n_rnd_dn == 0)   failures++;
    checks++; if (n_bigshift == 0) failures++;
    checks++; if (n_drop == 0)     failures++;
    checks++; if (n_zero_op == 0)  failures++;
    checks++; if (n_zero_res == 0) failures++;
    checks++; if (n_ovf == 0)      failures++;
    checks++; if (n_unf == 0)      failures++;
    checks++; if (n_b2b == 0)      failures++;
    checks++; if (n_gap == 0)      failures++;
    checks++; if (n_sticky == 0)   failures++;
    checks++; if (n_lead == 0)     failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
