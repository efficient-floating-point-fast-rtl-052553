// lzd: leading zero detector built by divide and conquer.
//
// The W-bit input (W a power of two, at least 2) is cut into 2-bit groups.
// A 2-bit cell gives D (a one is present) and P (its position counted from
// the left, 0 or 1).  Two neighbouring cells of size k merge into one of
// size 2k: D = Dhi | Dlo and P = Dhi ? {0,Phi} : {1,Plo}.  After log2(W)
// levels P is the number of leading zeros and ~D flags an all-zero input
// (count then reads W-1).  Purely combinational.
module lzd #(
  parameter int unsigned W = 64
) (
  input  logic [W-1:0]         a,
  output logic [$clog2(W)-1:0] cnt,
  output logic                 zero
);
  localparam int unsigned L = $clog2(W);

  logic               d [L+1][W];
  logic [L-1:0]       p [L+1][W];

  always_comb begin
    for (int l = 0; l <= L; l++)
      for (int j = 0; j < W; j++) begin
        d[l][j] = 1'b0;
        p[l][j] = '0;
      end
    // 2-bit cells
    for (int j = 0; j < W/2; j++) begin
      d[1][j] = a[2*j+1] | a[2*j];
      p[1][j] = {{(L-1){1'b0}}, ~a[2*j+1]};
    end
    // merge levels
    for (int l = 2; l <= L; l++)
      for (int j = 0; j < (W >> l); j++) begin
        d[l][j] = d[l-1][2*j+1] | d[l-1][2*j];
        p[l][j] = d[l-1][2*j+1] ? p[l-1][2*j+1]
                                : (p[l-1][2*j] | L'(1 << (l-1)));
      end
  end

  assign cnt  = p[L][0];
  assign zero = ~d[L][0];
endmodule
