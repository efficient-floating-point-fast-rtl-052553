// tb_util_pkg: reference arithmetic shared by the testbenches.  Values of
// BSD and Modified Booth significands are computed digit by digit with
// plain integer arithmetic, independently of the design.
package tb_util_pkg;
  // value of a BSD number: sum (p[i] - n[i]) 2^i, up to 62 digits
  function automatic longint bsd_int(logic [63:0] p, logic [63:0] n, int w);
    longint v = 0;
    for (int i = w - 1; i >= 0; i--) v = 2*v + longint'(p[i]) - longint'(n[i]);
    return v;
  endfunction

  // value of a Modified Booth string: w+ = non-zero, w- = negative
  function automatic longint mbe_int(logic [63:0] wp, logic [63:0] wn, int w);
    longint v = 0;
    for (int i = w - 1; i >= 0; i--) v = 2*v + (wp[i] ? (wn[i] ? -64'sd1 : 64'sd1) : 64'sd0);
    return v;
  endfunction

  function automatic real pow2(int e);
    real r = 1.0;
    if (e >= 0) for (int i = 0; i < e; i++) r = r * 2.0;
    else        for (int i = 0; i < -e; i++) r = r / 2.0;
    return r;
  endfunction

  function automatic real rabs(real x);
    return (x < 0.0) ? -x : x;
  endfunction

  function automatic real rmax(real a, real b);
    return (a > b) ? a : b;
  endfunction

  // random BSD digit string: each digit -1, 0 or +1 with equal chance
  function automatic void rand_bsd(output logic [63:0] p, output logic [63:0] n, input int w);
    p = '0;
    n = '0;
    for (int i = 0; i < w; i++) begin
      case ($urandom_range(2))
        0: p[i] = 1'b1;
        1: n[i] = 1'b1;
        default: ;
      endcase
    end
  endfunction

  // random Modified Booth string of w positions (w even): one radix-4 digit
  // in [-2, 2] per pair, +-2 at the upper position, +-1 at the lower one
  function automatic void rand_mbe(output logic [63:0] wp, output logic [63:0] wn, input int w);
    wp = '0;
    wn = '0;
    for (int j = 0; j < w/2; j++) begin
      int d = int'($urandom_range(4)) - 2;
      if (d == 2 || d == -2) begin wp[2*j+1] = 1'b1; wn[2*j+1] = (d < 0); end
      if (d == 1 || d == -1) begin wp[2*j]   = 1'b1; wn[2*j]   = (d < 0); end
    end
  endfunction
endpackage
