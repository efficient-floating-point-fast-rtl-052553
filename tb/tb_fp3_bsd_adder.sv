// tb_fp3_bsd_adder: three-operand addition of two redundant products and a
// third operand.
//  - equal exponents: nothing is shifted out, so the result must be the
//    exact sum rounded to nearest-even, bit for bit (reference: integer
//    sum, then integer rounding);
//  - random exponents: the result must be within one ulp of the real sum
//    plus the allowance for digits replaced by the sticky digit;
//  - leading digits of no significance, with coverage counters;
//  - a rounding tie decided by the sticky digit of a shifted-out operand;
//  - cancellation to zero, zero operands, overflow and underflow.
module tb_fp3_bsd_adder;
  import tb_util_pkg::*;
  int checks = 0, failures = 0;
  logic clk = 0;
  always #5 clk = ~clk;

  logic signed [9:0] x_e, y_e;  logic [53:0] x_p, x_n, y_p, y_n;
  logic [7:0] a_e;  logic [23:0] a_p, a_n;
  logic [7:0] r_e;  logic [23:0] r_p, r_n;  logic ovf, unf;

  fp3_bsd_adder dut (.x_e(x_e), .x_p(x_p), .x_n(x_n), .y_e(y_e), .y_p(y_p), .y_n(y_n),
                     .a_e(a_e), .a_p(a_p), .a_n(a_n),
                     .r_e(r_e), .r_p(r_p), .r_n(r_n), .ovf(ovf), .unf(unf));

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic real rval();
    return real'(bsd_int(64'(r_p), 64'(r_n), 24)) * pow2(int'(r_e) - 127 - 23);
  endfunction

  // random product-like operand: 49 random digits
  task automatic rand_prod(output logic [53:0] p, output logic [53:0] n);
    logic [63:0] p64, n64;
    rand_bsd(p64, n64, 49);
    p = p64[53:0];
    n = n64[53:0];
  endtask

  initial begin
    logic [63:0] ap64, an64;
    longint s, mag, sig, rem, half;
    int q, sh, e_exp;
    real ref_v, got, tol, mx;
    int nov = 0, nun = 0, nrun = 0, npost = 0;

    // ---- equal exponents: exact RNE reference ----
    for (int k = 0; k < 3000; k++) begin
      rand_prod(x_p, x_n);
      rand_prod(y_p, y_n);
      rand_bsd(ap64, an64, 24);
      a_p = ap64[23:0]; a_n = an64[23:0];
      e_exp = 60 + int'($urandom_range(120));
      x_e = 10'(e_exp); y_e = 10'(e_exp); a_e = 8'(e_exp);
      if (k % 10 == 0) begin y_p = x_n; y_n = x_p; end      // X + Y cancels
      #1;
      s = bsd_int(64'(x_p), 64'(x_n), 54) + bsd_int(64'(y_p), 64'(y_n), 54)
        + (bsd_int(ap64, an64, 24) <<< 23);
      checks++;
      if (s != 0) begin
        int top = 63;
        while (!dut.nz[top]) top--;
        if (int'(dut.sh) > 63 - top) nrun++;   // leading digits dropped
        if (!dut.mag[63]) npost++;             // one-place correction used
      end
      if (s == 0) begin
        if (r_e != 0 || r_p != 0 || r_n != 0) failures++;
      end else begin
        mag = (s < 0) ? -s : s;
        q = 63;
        while (!mag[q]) q--;
        if (q >= 24) begin
          sh = q - 23;
          sig = mag >>> sh;
          rem = mag & ((64'sd1 <<< sh) - 1);
          half = 64'sd1 <<< (sh - 1);
          if (rem > half || (rem == half && sig[0])) sig++;
          if (sig == (64'sd1 <<< 24)) begin sig = sig >>> 1; q++; end
        end else sig = mag <<< (23 - q);
        // value = mag * 2^(e-127-46), result exponent e + q - 46
        if (r_e != 8'(e_exp + q - 46) ||
            bsd_int(64'(r_p), 64'(r_n), 24) != ((s < 0) ? -sig : sig)) begin
          failures++;
          if (failures < 5) $display("exact mismatch k=%0d s=%0d r_e=%0d", k, s, r_e);
        end
      end
    end

    // ---- random exponents: bounded error ----
    for (int k = 0; k < 3000; k++) begin
      rand_prod(x_p, x_n);
      rand_prod(y_p, y_n);
      rand_bsd(ap64, an64, 24);
      a_p = ap64[23:0]; a_n = an64[23:0];
      x_e = 10'(80 + int'($urandom_range(60)));
      y_e = 10'(80 + int'($urandom_range(60)));
      a_e = 8'(80 + int'($urandom_range(60)));
      if (k % 7 == 0) begin x_p = '0; x_n = '0; x_e = 10'sd250; end  // zero operand, large exponent
      #1;
      ref_v = real'(bsd_int(64'(x_p), 64'(x_n), 54)) * pow2(int'(x_e) - 127 - 46)
            + real'(bsd_int(64'(y_p), 64'(y_n), 54)) * pow2(int'(y_e) - 127 - 46)
            + real'(bsd_int(ap64, an64, 24)) * pow2(int'(a_e) - 127 - 23);
      // up to one unit of the window's last digit per operand may be lost to the sticky digit
      mx = pow2(((x_p | x_n) == 0) ? ((int'(y_e) > int'(a_e)) ? int'(y_e) : int'(a_e))
                : ((int'(x_e) > int'(y_e)) ? ((int'(x_e) > int'(a_e)) ? int'(x_e) : int'(a_e))
                                           : ((int'(y_e) > int'(a_e)) ? int'(y_e) : int'(a_e)))
                - 127 - 49 + 2);
      got = rval();
      tol = rabs(ref_v) * pow2(-23) + mx;
      checks++;
      if (rabs(got - ref_v) > tol) begin
        failures++;
        if (failures < 5) $display("approx mismatch k=%0d ref=%g got=%g", k, ref_v, got);
      end
      // normalised: leading digit at the top, all digits of one sign
      checks++;
      if (got != 0.0 && (!(r_p[23] | r_n[23]) || (r_p != 0 && r_n != 0))) failures++;
    end

    // ---- leading digits of no significance ----
    // +1 then six -1 digits equals 2^40; a later -1 digit leaves 3 * 2^38,
    // whose leading one lands one place lower
    y_p = '0; y_n = '0; a_p = '0; a_n = '0;
    x_e = 10'sd127; y_e = 10'sd127; a_e = 8'd127;
    x_p = 54'd1 << 46; x_n = 54'h3f << 40;
    #1; checks++; if (r_e != 8'd121 || r_p != 24'h800000 || r_n != 0) failures++;
    x_n = (54'h3f << 40) | (54'd1 << 38);
    #1; checks++; if (r_e != 8'd120 || r_p != 24'hc00000 || r_n != 0) failures++;
    x_p = (54'h3f << 40) | (54'd1 << 38); x_n = 54'd1 << 46;       // negated
    #1; checks++; if (r_e != 8'd120 || r_n != 24'hc00000 || r_p != 0) failures++;
    checks++;
    if (nrun == 0 || npost == 0) begin
      failures++;
      $display("normalisation paths not covered: run=%0d post=%0d", nrun, npost);
    end

    // ---- sticky digit from operands shifted out of the window ----
    // X = 1 + 2^-24 sits exactly between two results; a tiny A decides
    x_p = (54'd1 << 46) | (54'd1 << 22); x_n = '0; x_e = 10'sd127;
    a_e = 8'd40;
    a_p = 24'h800000; a_n = '0;
    #1; checks++; if (r_e != 8'd127 || r_p != 24'h800001 || r_n != 0) failures++;
    a_p = '0; a_n = 24'h800000;
    #1; checks++; if (r_e != 8'd127 || r_p != 24'h800000 || r_n != 0) failures++;
    a_p = '0; a_n = '0;                                            // tie: even
    #1; checks++; if (r_e != 8'd127 || r_p != 24'h800000 || r_n != 0) failures++;
    a_p = 24'h800001; a_n = 24'h000003;    // shifted-out value is still positive
    #1; checks++; if (r_e != 8'd127 || r_p != 24'h800001 || r_n != 0) failures++;

    // ---- overflow and underflow ----
    x_p = 54'h3fffff << 24; x_n = '0; y_p = x_p; y_n = '0; a_p = 24'hffffff; a_n = '0;
    x_e = 10'sd254; y_e = 10'sd254; a_e = 8'd254;
    #1; checks++; if (!ovf || r_e != 8'hff || r_p != 24'h800000) failures++; else nov++;
    x_p = 54'd1; x_n = '0; y_p = '0; y_n = '0; a_p = '0; a_n = '0; x_e = 10'sd20;
    #1; checks++; if (!unf || r_e != 0 || r_p != 0 || r_n != 0) failures++; else nun++;
    x_p = '0; x_n = 54'd1 << 46; x_e = 10'sd127;                              // -1.0
    #1; checks++; if (r_e != 8'd127 || r_n != 24'h800000 || r_p != 0 || ovf || unf) failures++;
    checks++; if (nov == 0 || nun == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
