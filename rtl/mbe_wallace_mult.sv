// mbe_wallace_mult: 8x8 signed Modified Booth multiplier with a Wallace
// tree and a carry-lookahead adder, product registered on the clock.
//
// Booth encoder: the multiplier y (two's complement) is recoded into four
// radix-4 digits in [-2, 2], from bit triples y[2j+1], y[2j], y[2j-1].
// Booth decoder: each digit selects 0, x or 2x of the multiplicand x and
// inverts it for a negative digit; the +1 that completes the two's
// complement goes into a separate correction row.  Wallace tree: the four
// sign-extended partial products and the correction row (five rows of 16
// bits) are reduced to two rows by three levels of 3:2 carry-save adders.
// CLA: a 16-bit adder of four 4-bit carry-lookahead groups produces the
// product, which is registered on the rising clock edge (latency 1; no
// reset).  Port names and widths follow the multiplier the architecture was
// evaluated with; the signed operand format is this implementation's
// choice.
module mbe_wallace_mult (
  input  logic        clock,
  input  logic [7:0]  x,
  input  logic [7:0]  y,
  output logic [15:0] product
);
  // ---- Booth encoder -------------------------------------------------------
  logic [8:0] yb;
  logic [3:0] one, two, neg;
  assign yb = {y, 1'b0};

  for (genvar j = 0; j < 4; j++) begin : g_enc
    assign one[j] = yb[2*j+1] ^ yb[2*j];
    assign two[j] = (yb[2*j+2] & ~yb[2*j+1] & ~yb[2*j]) |
                    (~yb[2*j+2] & yb[2*j+1] & yb[2*j]);
    assign neg[j] = yb[2*j+2] & ~(yb[2*j+1] & yb[2*j]);
  end

  // ---- Booth decoder: partial product rows -------------------------------
  logic [15:0] row [5];
  logic [8:0]  xs;
  assign xs = {x[7], x};

  for (genvar j = 0; j < 4; j++) begin : g_dec
    logic [8:0] sel, pp;
    assign sel = ({9{one[j]}} & xs) | ({9{two[j]}} & {xs[7:0], 1'b0});
    assign pp  = sel ^ {9{neg[j]}};
    assign row[j] = 16'({{7{pp[8]}}, pp} << (2*j));
  end
  assign row[4] = {9'd0, neg[3], 1'b0, neg[2], 1'b0, neg[1], 1'b0, neg[0]};

  // ---- Wallace tree ------------------------------------------------------
  function automatic logic [31:0] csa(logic [15:0] a, logic [15:0] b, logic [15:0] c);
    logic [15:0] s;
    logic [14:0] k;   // carry out of bit 15 falls outside the product
    s = a ^ b ^ c;
    k = (a[14:0] & b[14:0]) | (a[14:0] & c[14:0]) | (b[14:0] & c[14:0]);
    return {s, k, 1'b0};
  endfunction

  logic [15:0] s1, c1, s2, c2, s3, c3;
  assign {s1, c1} = csa(row[0], row[1], row[2]);
  assign {s2, c2} = csa(row[3], row[4], s1);
  assign {s3, c3} = csa(c1, s2, c2);

  // ---- carry-lookahead adder ---------------------------------------------
  logic [15:0] g, p, sum;
  logic [16:0] c;
  assign g = s3 & c3;
  assign p = s3 ^ c3;
  always_comb begin
    logic cin;
    cin  = 1'b0;
    c    = '0;
    for (int grp = 0; grp < 4; grp++) begin
      for (int i = 0; i < 4; i++) begin
        // c[b+i+1] = g[b+i] | p[b+i]g[b+i-1] | ... | p[b+i]..p[b]c[b]
        logic acc, pr;
        acc = 1'b0;
        pr  = 1'b1;
        for (int k = i; k >= 0; k--) begin
          acc = acc | (pr & g[4*grp+k]);
          pr  = pr & p[4*grp+k];
        end
        c[4*grp+i+1] = acc | (pr & cin);
      end
      cin = c[4*grp+4];
    end
  end
  assign sum = p ^ c[15:0];

  always_ff @(posedge clock) product <= sum;
endmodule
