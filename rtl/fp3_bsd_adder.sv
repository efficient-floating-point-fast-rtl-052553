// fp3_bsd_adder: three-operand floating-point adder for BSD significands.
//
// Adds two redundant products X and Y (PW-digit BSD significands with
// 2(N-1) fraction digits, signed exponents from fp_bsd_mult) and a third
// operand A (N-digit BSD significand, N-1 fraction digits), and returns
// X + Y + A rounded to a normalised N-digit significand.  Steps:
//   1. exponent comparison: three exponent subtractions pick the largest
//      exponent of the non-zero operands;
//   2. significand alignment: each operand is placed in a common window of
//      AW = PW + G digits (G guard digits below the products' last digit)
//      and shifted right by its distance to the largest exponent; the
//      lowest guard place is a sticky digit holding the sign (-1, 0, +1)
//      of whatever was shifted past the others;
//   3. a first carry-limited BSD adder forms SUM = X + Y and a second one
//      adds the aligned A; no carry-save or carry-propagate adder and no
//      sign logic are needed, since signs live in the digits;
//   4. normalisation: leading non-zero digits of no significance (a digit
//      followed by a run of digits of the opposite sign) are found without
//      carries and dropped, a divide-and-conquer LZD counts them together
//      with the leading zeros, a barrel shifter moves the significant
//      leading digit to the top, and only then is the string converted to
//      a magnitude, which needs at most a one-place correction shift;
//   5. rounding to nearest, ties to even, from the round bit and the sticky
//      OR of the rest, with a renormalisation on carry-out;
//   6. exponent adjustment for the shifts of steps 4 and 5.
// The result is written back as BSD digits that all carry the sign.  A zero
// sum or an exponent at or below 0 gives zero (unf flags the latter); an
// exponent at or above 2^EW-1 saturates to exponent 2^EW-1 with
// significand 1.0 and sets ovf.  Steps 1 to 3 and 6 follow the published
// three-operand BSD adder and step 4 follows its normalisation order;
// the single LZD over a marked string, the signed sticky digit, the
// guard width G and the overflow handling are choices of this
// implementation.  Purely combinational.
module fp3_bsd_adder #(
  parameter int unsigned N    = 24,
  parameter int unsigned EW   = 8,
  parameter int unsigned PW   = 2*N + 6,
  parameter int unsigned G    = 3
) (
  input  logic signed [EW+1:0] x_e,
  input  logic [PW-1:0]        x_p, x_n,
  input  logic signed [EW+1:0] y_e,
  input  logic [PW-1:0]        y_p, y_n,
  input  logic [EW-1:0]        a_e,
  input  logic [N-1:0]         a_p, a_n,
  output logic [EW-1:0]        r_e,
  output logic [N-1:0]         r_p, r_n,
  output logic                 ovf,
  output logic                 unf
);
  localparam int unsigned FP = 2*(N-1);            // fraction digits of a product
  localparam int unsigned AW = PW + G;             // alignment window
  localparam int unsigned RW = AW + 2;             // digits after two BSD adders
  localparam int unsigned LW = 1 << $clog2(RW + 1);
  localparam int unsigned LB = $clog2(LW);
  localparam int unsigned XW = EW + 4;             // internal exponent width
  localparam logic signed [XW-1:0] E_LOW = -(XW'(1) <<< (XW-2));

  // ---- 1. exponent comparison ---------------------------------------------
  logic xz, yz, az;
  logic signed [XW-1:0] ex, ey, ea, emax;
  logic signed [XW-1:0] dxy, dxa, dya;

  assign xz = ~|(x_p | x_n);
  assign yz = ~|(y_p | y_n);
  assign az = ~|(a_p | a_n);

  assign ex = xz ? E_LOW : XW'(x_e);
  assign ey = yz ? E_LOW : XW'(y_e);
  assign ea = az ? E_LOW : $signed({{(XW-EW){1'b0}}, a_e});

  assign dxy = ex - ey;
  assign dxa = ex - ea;
  assign dya = ey - ea;

  always_comb begin
    if (!dxy[XW-1] && !dxa[XW-1]) emax = ex;
    else if (dxy[XW-1] && !dya[XW-1]) emax = ey;
    else emax = ea;
  end

  // ---- 2. significand alignment -------------------------------------------
  // The top AW-1 window digits hold the operand; the lowest one is a sticky
  // digit.  The sign of the digits shifted out of the window is the sign of
  // their leading non-zero digit, so it is found without carries and kept
  // as -1, 0 or +1 in the sticky place, below every digit that survives.
  localparam int unsigned HW = AW - 1;

  function automatic logic [2*HW-1:0] rshift(logic [HW-1:0] v, logic signed [XW-1:0] d);
    if (d >= XW'(HW)) return {{HW{1'b0}}, v};
    return {v, {HW{1'b0}}} >> d;
  endfunction

  function automatic logic [1:0] sticky_digit(logic [HW-1:0] p, logic [HW-1:0] n);
    logic found, pos;
    found = 1'b0;
    pos   = 1'b0;
    for (int i = HW - 1; i >= 0; i--)
      if (!found && (p[i] ^ n[i])) begin
        found = 1'b1;
        pos   = p[i];
      end
    return {found & pos, found & ~pos};
  endfunction

  logic [HW-1:0]   xw_p, xw_n, yw_p, yw_n, aw_p, aw_n;
  logic [2*HW-1:0] xs_p, xs_n, ys_p, ys_n, as_p, as_n;
  logic [1:0]      xk, yk, ak;
  logic [AW-1:0]   xa_p, xa_n, ya_p, ya_n, aa_p, aa_n;

  assign xw_p = {x_p, {(G-1){1'b0}}};
  assign xw_n = {x_n, {(G-1){1'b0}}};
  assign yw_p = {y_p, {(G-1){1'b0}}};
  assign yw_n = {y_n, {(G-1){1'b0}}};
  assign aw_p = HW'(a_p) << (N - 2 + G);
  assign aw_n = HW'(a_n) << (N - 2 + G);

  assign xs_p = rshift(xw_p, emax - ex);
  assign xs_n = rshift(xw_n, emax - ex);
  assign ys_p = rshift(yw_p, emax - ey);
  assign ys_n = rshift(yw_n, emax - ey);
  assign as_p = rshift(aw_p, emax - ea);
  assign as_n = rshift(aw_n, emax - ea);

  assign xk = sticky_digit(xs_p[HW-1:0], xs_n[HW-1:0]);
  assign yk = sticky_digit(ys_p[HW-1:0], ys_n[HW-1:0]);
  assign ak = sticky_digit(as_p[HW-1:0], as_n[HW-1:0]);

  assign xa_p = {xs_p[2*HW-1:HW], xk[1]};
  assign xa_n = {xs_n[2*HW-1:HW], xk[0]};
  assign ya_p = {ys_p[2*HW-1:HW], yk[1]};
  assign ya_n = {ys_n[2*HW-1:HW], yk[0]};
  assign aa_p = {as_p[2*HW-1:HW], ak[1]};
  assign aa_n = {as_n[2*HW-1:HW], ak[0]};

  // ---- 3. two carry-limited BSD adders ------------------------------------
  logic [AW:0]   sum_p, sum_n;
  logic [AW+1:0] res_p, res_n;

  bsd_adder #(.W(AW)) u_add_xy (
    .xp(xa_p), .xn(xa_n), .yp(ya_p), .yn(ya_n), .sp(sum_p), .sn(sum_n)
  );
  bsd_adder #(.W(AW+1)) u_add_a (
    .xp(sum_p), .xn(sum_n), .yp({1'b0, aa_p}), .yn({1'b0, aa_n}),
    .sp(res_p), .sn(res_n)
  );

  // ---- 4. normalisation ---------------------------------------------------
  // A BSD string that starts with digit d followed by a run of r digits
  // equal to -d has the value of d placed r positions lower, so those
  // leading non-zero digits carry no significance.  Marking every position
  // below the leading non-zero digit whose digit is not -d, one LZD gives
  // the leading zeros plus that run in one count.  The barrel shifter then
  // moves the significant leading digit to the top, where it is rewritten
  // as d.  Only then is the string turned into a magnitude; the next digit
  // is 0 or d, so the magnitude's leading one is in the top two places and
  // a one-place shift finishes the job.
  logic [LW-1:0] qp, qn, nz, above, f;
  logic [LW-2:0] sp_sh, sn_sh;             // the top place is rewritten
  logic [LW-1:0] t_p, t_n, mag, msh;
  logic          dpos, neg, allz, fz;
  logic [LB-1:0] fcnt;
  logic [LB:0]   sh, lz;

  assign qp = LW'(res_p);
  assign qn = LW'(res_n);
  assign nz = qp ^ qn;                     // p = n = 1 is a zero digit

  // above[i]: some non-zero digit sits above position i
  always_comb begin
    above[LW-1] = 1'b0;
    for (int i = LW - 2; i >= 0; i--) above[i] = above[i+1] | nz[i+1];
  end

  assign allz = ~|nz;
  assign dpos = |(nz & ~above & qp);       // sign of the leading digit
  assign neg  = ~dpos;
  // positions below the leading digit that end its run of -d digits
  assign f    = above & ~(nz & (dpos ? qn : qp));

  lzd #(.W(LW)) u_lzd (.a(f), .cnt(fcnt), .zero(fz));

  assign sh = fz ? (LB+1)'(LW - 1) : (LB+1)'(fcnt) - 1'b1;

  assign sp_sh = (LW-1)'(qp << sh);        // barrel shifter
  assign sn_sh = (LW-1)'(qn << sh);
  assign t_p   = {dpos, sp_sh};
  assign t_n   = {~dpos, sn_sh};
  assign mag   = dpos ? t_p - t_n : t_n - t_p;
  assign msh   = mag[LW-1] ? mag : mag << 1;
  assign lz    = mag[LW-1] ? sh : sh + 1'b1;

  // ---- 5. rounding ----------------------------------------------------------
  logic [N-1:0] sig;
  logic         rnd, stk, inc;
  logic [N:0]   sig_r;

  assign sig   = msh[LW-1 -: N];
  assign rnd   = msh[LW-1-N];
  assign stk   = |msh[LW-2-N:0];
  assign inc   = rnd & (stk | sig[0]);
  assign sig_r = {1'b0, sig} + (N+1)'(inc);

  // ---- 6. exponent adjustment ---------------------------------------------
  logic signed [XW-1:0] e_res;
  logic [N-1:0]         sig_f;

  assign e_res = emax + XW'(LW - 1) - XW'(lz) - XW'(FP + G) + XW'(sig_r[N]);
  assign sig_f = sig_r[N] ? sig_r[N:1] : sig_r[N-1:0];

  always_comb begin
    ovf = 1'b0;
    unf = 1'b0;
    r_e = e_res[EW-1:0];
    r_p = neg ? '0 : sig_f;
    r_n = neg ? sig_f : '0;
    if (allz) begin
      r_e = '0;
      r_p = '0;
      r_n = '0;
    end else if (e_res <= 0) begin
      unf = 1'b1;
      r_e = '0;
      r_p = '0;
      r_n = '0;
    end else if (e_res >= XW'((1 << EW) - 1)) begin
      ovf = 1'b1;
      r_e = '1;
      r_p = neg ? '0 : (N'(1) << (N-1));
      r_n = neg ? (N'(1) << (N-1)) : '0;
    end
  end
endmodule
