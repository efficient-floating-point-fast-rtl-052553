// tb_fft8_workload: an 8-point radix-2 decimation-in-time FFT computed on
// one fft_butterfly, 12 butterflies in 3 stages.  Stage outputs stay in
// the BSD-significand format and feed the next stage unchanged; twiddles
// W8^m = cos(2*pi*m/8) - j sin(2*pi*m/8) are rounded to single precision
// and recoded to Modified Booth form here (radix-4 digits by repeated
// division, independent of the design's recoder).  Several random input
// frames are transformed and each bin is compared with a double precision
// DFT of the same (single precision) inputs.
module tb_fft8_workload;
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
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // real -> IEEE single fields, rounded to nearest
  function automatic logic [31:0] to_single(real v);
    real a;
    int e;
    longint f;
    if (rabs(v) < 1.0e-30) return 32'd0;
    a = rabs(v);
    e = 0;
    while (a >= 2.0) begin a = a / 2.0; e++; end
    while (a < 1.0)  begin a = a * 2.0; e--; end
    f = longint'((a - 1.0) * pow2(23));
    if (f == (64'sd1 <<< 23)) begin f = 0; e++; end
    return {v < 0.0, 8'(e + 127), 23'(f)};
  endfunction

  function automatic real single_val(logic [31:0] s);
    real m;
    if (s[30:23] == 0) return 0.0;
    m = (1.0 + real'(s[22:0]) * pow2(-23)) * pow2(int'(s[30:23]) - 127);
    return s[31] ? -m : m;
  endfunction

  function automatic bsd_fp_t to_bsd(logic [31:0] s);
    bsd_fp_t r;
    logic [23:0] mag;
    mag = (s[30:23] == 0) ? 24'd0 : {1'b1, s[22:0]};
    r.e = s[30:23];
    r.p = s[31] ? 24'd0 : mag;
    r.n = s[31] ? mag : 24'd0;
    return r;
  endfunction

  // radix-4 digits in [-2, 1] by repeated division, then the MBE code
  function automatic mbe_fp_t to_mbe(logic [31:0] s);
    mbe_fp_t r;
    longint v;
    int d;
    r.e = s[30:23];
    r.wp = '0;
    r.wn = '0;
    v = (s[30:23] == 0) ? 0 : longint'({1'b1, s[22:0]});
    for (int j = 0; j < 13; j++) begin
      d = int'(v % 4);
      if (d >= 2) d = d - 4;
      v = (v - longint'(d)) / 4;
      if (s[31]) d = -d;
      if (d == 2 || d == -2) begin r.wp[2*j+1] = 1'b1; r.wn[2*j+1] = (d < 0); end
      if (d == 1 || d == -1) begin r.wp[2*j]   = 1'b1; r.wn[2*j]   = (d < 0); end
    end
    return r;
  endfunction

  function automatic real fv(bsd_fp_t x);
    return real'(bsd_int(64'(x.p), 64'(x.n), 24)) * pow2(int'(x.e) - 127 - 23);
  endfunction

  function automatic int bitrev3(int i);
    return ((i & 1) << 2) | (i & 2) | ((i >> 2) & 1);
  endfunction

  bsd_fp_t xr [8], xi [8];
  mbe_fp_t twr [4], twi [4];

  initial begin
    real pi, inr [8], ini [8], refr, refi, scale;
    int n_frames;
    n_frames = 6;
    pi = 3.14159265358979323846;
    for (int m = 0; m < 4; m++) begin
      twr[m] = to_mbe(to_single($cos(2.0*pi*m/8.0)));
      twi[m] = to_mbe(to_single(-$sin(2.0*pi*m/8.0)));
    end
    repeat (3) @(posedge clk);
    rst_n <= 1;
    @(posedge clk);
    for (int fr = 0; fr < n_frames; fr++) begin
      // random frame, snapped to single precision; bit-reversed load
      scale = 0.0;
      for (int i = 0; i < 8; i++) begin
        logic [31:0] sr, si;
        sr = to_single((real'($urandom_range(2000000)) - 1000000.0) / 1000.0);
        si = to_single((real'($urandom_range(2000000)) - 1000000.0) / 1000.0);
        if (fr == 0) si = 32'd0;    // one purely real frame
        inr[i] = single_val(sr);
        ini[i] = single_val(si);
        scale += rabs(inr[i]) + rabs(ini[i]);
        xr[bitrev3(i)] = to_bsd(sr);
        xi[bitrev3(i)] = to_bsd(si);
      end
      // three stages of four butterflies
      for (int st = 0; st < 3; st++) begin
        int half;
        half = 1 << st;
        for (int g = 0; g < 8; g += 2*half)
          for (int j = 0; j < half; j++) begin
            int ia, ib, m;
            ia = g + j;
            ib = g + j + half;
            m  = j * (4 >> st);
            a_re = xr[ia]; a_im = xi[ia]; b_re = xr[ib]; b_im = xi[ib];
            w_re = twr[m]; w_im = twi[m];
            in_valid = 1'b1;
            @(posedge clk);
            #1;
            checks++;
            if (!out_valid || ovf || unf) failures++;
            xr[ia] = sum_re; xi[ia] = sum_im;
            xr[ib] = dif_re; xi[ib] = dif_im;
            in_valid = 1'b0;
          end
      end
      // compare with a double precision DFT
      for (int k = 0; k < 8; k++) begin
        refr = 0.0;
        refi = 0.0;
        for (int i = 0; i < 8; i++) begin
          refr += inr[i] * $cos(2.0*pi*i*k/8.0) + ini[i] * $sin(2.0*pi*i*k/8.0);
          refi += ini[i] * $cos(2.0*pi*i*k/8.0) - inr[i] * $sin(2.0*pi*i*k/8.0);
        end
        checks += 2;
        if (rabs(fv(xr[k]) - refr) > scale * pow2(-20) ||
            rabs(fv(xi[k]) - refi) > scale * pow2(-20)) begin
          failures++;
          if (failures < 5) $display("frame %0d bin %0d: ref %g, %g got %g, %g",
                                     fr, k, refr, refi, fv(xr[k]), fv(xi[k]));
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
