// fdpa: fused dot product add unit for BSD floating-point operands.
//
// Computes  X*W1 + Y*W2 + A  (output "plus") and  X*W1 + Y*W2 - A  (output
// "minus") in one step: two redundant constant multipliers produce both
// products in BSD form, without rounding or normalising them, and two
// three-operand BSD adders each add the pair of products to +A or to -A
// (A's posibits and negabits exchanged), normalising and rounding once.
// X, Y and A carry N-digit BSD significands; W1 and W2 carry Modified
// Booth significands (N+2 positions).  Sharing the multipliers between the
// two outputs is this implementation's choice; the unit's two outputs
// (dubbed + and -) follow the published architecture.  Purely combinational.
module fdpa #(
  parameter int unsigned N    = 24,
  parameter int unsigned EW   = 8,
  parameter int unsigned BIAS = 127
) (
  input  logic [EW-1:0] x_e,  input logic [N-1:0] x_p,  x_n,
  input  logic [EW-1:0] w1_e, input logic [N+1:0] w1_p, w1_n,
  input  logic [EW-1:0] y_e,  input logic [N-1:0] y_p,  y_n,
  input  logic [EW-1:0] w2_e, input logic [N+1:0] w2_p, w2_n,
  input  logic [EW-1:0] a_e,  input logic [N-1:0] a_p,  a_n,
  output logic [EW-1:0] pl_e, output logic [N-1:0] pl_p, pl_n,
  output logic [EW-1:0] mi_e, output logic [N-1:0] mi_p, mi_n,
  output logic          ovf,
  output logic          unf
);
  localparam int unsigned PW = 2*N + 6;

  logic signed [EW+1:0] p1_e, p2_e;
  logic [PW-1:0]        p1_p, p1_n, p2_p, p2_n;
  logic                 ovf_pl, ovf_mi, unf_pl, unf_mi;

  fp_bsd_mult #(.N(N), .EW(EW), .BIAS(BIAS), .PW(PW)) u_mul1 (
    .b_e(x_e), .b_p(x_p), .b_n(x_n), .w_e(w1_e), .w_p(w1_p), .w_n(w1_n),
    .p_e(p1_e), .prod_p(p1_p), .prod_n(p1_n)
  );
  fp_bsd_mult #(.N(N), .EW(EW), .BIAS(BIAS), .PW(PW)) u_mul2 (
    .b_e(y_e), .b_p(y_p), .b_n(y_n), .w_e(w2_e), .w_p(w2_p), .w_n(w2_n),
    .p_e(p2_e), .prod_p(p2_p), .prod_n(p2_n)
  );

  fp3_bsd_adder #(.N(N), .EW(EW), .PW(PW)) u_add_plus (
    .x_e(p1_e), .x_p(p1_p), .x_n(p1_n),
    .y_e(p2_e), .y_p(p2_p), .y_n(p2_n),
    .a_e(a_e),  .a_p(a_p),  .a_n(a_n),
    .r_e(pl_e), .r_p(pl_p), .r_n(pl_n), .ovf(ovf_pl), .unf(unf_pl)
  );
  fp3_bsd_adder #(.N(N), .EW(EW), .PW(PW)) u_add_minus (
    .x_e(p1_e), .x_p(p1_p), .x_n(p1_n),
    .y_e(p2_e), .y_p(p2_p), .y_n(p2_n),
    .a_e(a_e),  .a_p(a_n),  .a_n(a_p),
    .r_e(mi_e), .r_p(mi_p), .r_n(mi_n), .ovf(ovf_mi), .unf(unf_mi)
  );

  assign ovf = ovf_pl | ovf_mi;
  assign unf = unf_pl | unf_mi;
endmodule
