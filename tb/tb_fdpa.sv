// tb_fdpa: random fused dot products X*W1 + Y*W2 +- A.  Both outputs must
// lie within one ulp of the real result plus a small allowance for the
// guard digits, and be normalised.
module tb_fdpa;
  import tb_util_pkg::*;
  int checks = 0, failures = 0;
  logic clk = 0;
  always #5 clk = ~clk;

  logic [7:0]  x_e, y_e, a_e, w1_e, w2_e, pl_e, mi_e;
  logic [23:0] x_p, x_n, y_p, y_n, a_p, a_n, pl_p, pl_n, mi_p, mi_n;
  logic [25:0] w1_p, w1_n, w2_p, w2_n;
  logic ovf, unf;

  fdpa dut (.x_e(x_e), .x_p(x_p), .x_n(x_n), .w1_e(w1_e), .w1_p(w1_p), .w1_n(w1_n),
            .y_e(y_e), .y_p(y_p), .y_n(y_n), .w2_e(w2_e), .w2_p(w2_p), .w2_n(w2_n),
            .a_e(a_e), .a_p(a_p), .a_n(a_n),
            .pl_e(pl_e), .pl_p(pl_p), .pl_n(pl_n), .mi_e(mi_e), .mi_p(mi_p), .mi_n(mi_n),
            .ovf(ovf), .unf(unf));

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic real fv(logic [7:0] e, logic [23:0] p, logic [23:0] n);
    return real'(bsd_int(64'(p), 64'(n), 24)) * pow2(int'(e) - 127 - 23);
  endfunction
  function automatic real wv(logic [7:0] e, logic [25:0] p, logic [25:0] n);
    return real'(mbe_int(64'(p), 64'(n), 26)) * pow2(int'(e) - 127 - 23);
  endfunction

  function automatic int imax(int a, int b);
    return (a > b) ? a : b;
  endfunction

  task automatic check(real got, real ref_v, real mx, logic [23:0] p, logic [23:0] n);
    checks++;
    if (rabs(got - ref_v) > rabs(ref_v) * pow2(-23) + mx) begin
      failures++;
      if (failures < 5) $display("mismatch ref=%g got=%g", ref_v, got);
    end
    checks++;
    if (got != 0.0 && (!(p[23] | n[23]) || (p != 0 && n != 0))) failures++;
  endtask

  initial begin
    logic [63:0] p, n;
    real t1, t2, ta, mx;
    for (int k = 0; k < 3000; k++) begin
      rand_bsd(p, n, 24); x_p = p[23:0]; x_n = n[23:0];
      rand_bsd(p, n, 24); y_p = p[23:0]; y_n = n[23:0];
      rand_bsd(p, n, 24); a_p = p[23:0]; a_n = n[23:0];
      rand_mbe(p, n, 26); w1_p = p[25:0]; w1_n = n[25:0];
      rand_mbe(p, n, 26); w2_p = p[25:0]; w2_n = n[25:0];
      x_e = 8'(100 + $urandom_range(40)); y_e = 8'(100 + $urandom_range(40));
      a_e = 8'(100 + $urandom_range(40));
      w1_e = 8'(120 + $urandom_range(10)); w2_e = 8'(120 + $urandom_range(10));
      #1;
      t1 = fv(x_e, x_p, x_n) * wv(w1_e, w1_p, w1_n);
      t2 = fv(y_e, y_p, y_n) * wv(w2_e, w2_p, w2_n);
      ta = fv(a_e, a_p, a_n);
      // digits below the alignment window (3 guard digits under a product's
      // last digit at the largest exponent) only survive as a sticky sign
      mx = pow2(imax(imax(int'(x_e) + int'(w1_e) - 127, int'(y_e) + int'(w2_e) - 127),
                     int'(a_e)) - 127 - 49 + 2);
      check(fv(pl_e, pl_p, pl_n), t1 + t2 + ta, mx, pl_p, pl_n);
      check(fv(mi_e, mi_p, mi_n), t1 + t2 - ta, mx, mi_p, mi_n);
      checks++;
      if (ovf || unf) failures++;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
