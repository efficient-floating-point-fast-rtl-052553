// bsd_ppg: generator of one partial product of the redundant multiplier.
//
// The multiplicand B is a BSD number of N digits.  One pair of Modified
// Booth positions of the multiplier, (w-, w+) at i+1 and at i, selects the
// partial product:
//   w+ at i+1 set -> 2B, negated when w- at i+1 is set
//   w+ at i   set -> B,  negated when w- at i   is set
//   neither       -> 0
// 2B is B shifted one place left and -B is B with posibits and negabits
// exchanged, so no adder is needed.  A multiplexer steered by w+ at i+1
// picks the 2B path or the B path, as in the published selection table.
// The result has N+1 digits.  Purely combinational.
module bsd_ppg #(
  parameter int unsigned N = 24
) (
  input  logic [N-1:0] bp, bn,     // multiplicand B
  input  logic         w1p, w1n,   // MBE position i+1: w+, w-
  input  logic         w0p, w0n,   // MBE position i:   w+, w-
  output logic [N:0]   pp_p, pp_n  // partial product
);
  logic [N:0] b1p, b1n, b2p, b2n;   // B and 2B
  logic [N:0] t1p, t1n, t2p, t2n;   // enabled, possibly negated

  assign b1p = {1'b0, bp};
  assign b1n = {1'b0, bn};
  assign b2p = {bp, 1'b0};
  assign b2n = {bn, 1'b0};

  always_comb begin
    t2p = {(N+1){w1p}} & (w1n ? b2n : b2p);
    t2n = {(N+1){w1p}} & (w1n ? b2p : b2n);
    t1p = {(N+1){w0p}} & (w0n ? b1n : b1p);
    t1n = {(N+1){w0p}} & (w0n ? b1p : b1n);
    pp_p = w1p ? t2p : t1p;
    pp_n = w1p ? t2n : t1n;
  end
endmodule
