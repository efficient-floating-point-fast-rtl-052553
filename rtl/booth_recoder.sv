// booth_recoder: Booth encoder for a twiddle significand.
//
// Recodes an N-bit unsigned significand m (N even) and a sign into N+2
// Modified Booth positions.  Radix-4 digit j = -2*b[2j+1] + b[2j] + b[2j-1]
// (b[-1] = 0, zero-extended above the top) lies in [-2, 2]; a +-2 is placed
// at position 2j+1 and a +-1 at position 2j, so each binary position holds
// a value in {-1, 0, 1} and each pair holds at most one non-zero.  Each
// position is coded as (w-, w+) = (sign, magnitude): 00 = 0, 01 = +1,
// 11 = -1.  The number's own sign flips the sign of every non-zero digit.
// Purely combinational.
module booth_recoder #(
  parameter int unsigned N = 24
) (
  input  logic [N-1:0] m,
  input  logic         sign,
  output logic [N+1:0] wp,   // w+ : position is non-zero
  output logic [N+1:0] wn    // w- : position is negative
);
  localparam int unsigned K = N/2 + 1;   // radix-4 digits

  logic [N+2:0] b;   // b[0] stands for bit -1
  assign b = {2'b00, m, 1'b0};

  for (genvar j = 0; j < K; j++) begin : g_dig
    logic b2, b1, b0, one, two, neg;
    assign b2  = b[2*j+2];
    assign b1  = b[2*j+1];
    assign b0  = b[2*j];
    assign one = b1 ^ b0;
    assign two = (b2 & ~b1 & ~b0) | (~b2 & b1 & b0);
    assign neg = (b2 & ~(b1 & b0)) ^ sign;
    assign wp[2*j]   = one;
    assign wn[2*j]   = one & neg;
    assign wp[2*j+1] = two;
    assign wn[2*j+1] = two & neg;
  end
endmodule
