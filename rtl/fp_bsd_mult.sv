// fp_bsd_mult: redundant floating-point constant multiplier.
//
// Multiplies a floating-point B with an N-digit BSD significand by a
// twiddle W whose significand is held in Modified Booth form (N+2
// positions, at most one non-zero per pair).  Partial product generation:
// each of the K = N/2+1 position pairs drives a bsd_ppg that yields 0, +-B
// or +-2B (N+1 digits) with no adder.  Partial product reduction: the K
// partial products, shifted by 2j, are summed by a balanced tree of
// carry-limited BSD adders (K-1 adders, ceil(log2 K) adder delays; the
// default K = 13 takes 12 adders in 4 levels).  No carry-propagating adder
// follows: the product stays in BSD form, PW digits wide.  Operands are
// zero-padded to PW digits, which leaves room for the one digit each tree
// level can add, so every adder's top output digit is zero and dropped.
//
// Value convention: B = b_sig * 2^(b_e - BIAS - (N-1)), W likewise, and the
// product = prod_sig * 2^(p_e - BIAS - 2(N-1)), with p_e = b_e + w_e - BIAS
// as a signed number two bits wider than an exponent (it may leave the
// exponent range; the adder that follows resolves that).  A zero operand
// gives an all-zero product.  Purely combinational.
module fp_bsd_mult #(
  parameter int unsigned N    = 24,
  parameter int unsigned EW   = 8,
  parameter int unsigned BIAS = 127,
  parameter int unsigned PW   = 2*N + 6
) (
  input  logic [EW-1:0]        b_e,
  input  logic [N-1:0]         b_p, b_n,
  input  logic [EW-1:0]        w_e,
  input  logic [N+1:0]         w_p, w_n,   // MBE w+ and w-
  output logic signed [EW+1:0] p_e,
  output logic [PW-1:0]        prod_p, prod_n
);
  localparam int unsigned K = N/2 + 1;

  function automatic int unsigned cnt_at(int unsigned l);
    int unsigned c = K;
    for (int unsigned i = 0; i < l; i++) c = (c + 1) / 2;
    return c;
  endfunction

  localparam int unsigned LV = $clog2(K);

  // Partial product generation
  logic [PW-1:0] pp_p [K];
  logic [PW-1:0] pp_n [K];

  for (genvar j = 0; j < K; j++) begin : g_ppg
    logic [N:0] q_p, q_n;
    bsd_ppg #(.N(N)) u_ppg (
      .bp(b_p), .bn(b_n),
      .w1p(w_p[2*j+1]), .w1n(w_n[2*j+1]),
      .w0p(w_p[2*j]),   .w0n(w_n[2*j]),
      .pp_p(q_p), .pp_n(q_n)
    );
    assign pp_p[j] = PW'(q_p) << (2*j);
    assign pp_n[j] = PW'(q_n) << (2*j);
  end

  // Partial product reduction: pairwise BSD adder tree.  Level l turns
  // cnt_at(l) operands into cnt_at(l+1); an odd operand passes unchanged.
  for (genvar l = 0; l < LV; l++) begin : g_lvl
    logic [PW-1:0] in_p  [cnt_at(l)];
    logic [PW-1:0] in_n  [cnt_at(l)];
    logic [PW-1:0] out_p [cnt_at(l+1)];
    logic [PW-1:0] out_n [cnt_at(l+1)];
    if (l == 0) begin : g_src
      assign in_p = pp_p;
      assign in_n = pp_n;
    end else begin : g_src
      assign in_p = g_lvl[l-1].out_p;
      assign in_n = g_lvl[l-1].out_n;
    end
    for (genvar j = 0; j < cnt_at(l+1); j++) begin : g_node
      if (2*j + 1 < cnt_at(l)) begin : g_add
        logic [PW:0] s_p, s_n;
        bsd_adder #(.W(PW)) u_add (
          .xp(in_p[2*j]),   .xn(in_n[2*j]),
          .yp(in_p[2*j+1]), .yn(in_n[2*j+1]),
          .sp(s_p), .sn(s_n)
        );
        // the top digit is zero by the headroom argument above
        assign out_p[j] = s_p[PW-1:0];
        assign out_n[j] = s_n[PW-1:0];
        always_comb
          assert (s_p[PW] == s_n[PW])
            else $error("fp_bsd_mult: reduction tree overflowed its %0d digits", PW);
      end else begin : g_pass
        assign out_p[j] = in_p[2*j];
        assign out_n[j] = in_n[2*j];
      end
    end
  end

  assign prod_p = g_lvl[LV-1].out_p[0];
  assign prod_n = g_lvl[LV-1].out_n[0];
  assign p_e    = $signed({2'b00, b_e}) + $signed({2'b00, w_e}) - $signed((EW+2)'(BIAS));
endmodule
