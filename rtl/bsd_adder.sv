// bsd_adder: carry-limited adder of two binary signed digit numbers.
//
// Each operand has W digits, digit i = p[i] - n[i].  Every digit slice uses
// two full adders and inverted negabits, so the carry never travels more
// than one position and the delay does not depend on W:
//   FA1 adds xp[i] + yp[i] + ~xn[i] = 2*c[i+1] + s1[i]; this leaves a
//       posibit c[i+1] one place up and a negabit ~s1[i] in place.
//   FA2 adds s1[i] + ~yn[i] + c[i] = 2*cc[i+1] + sp[i]; this leaves the
//       result posibit sp[i] and a negabit ~cc[i+1] one place up.
// The result digit i is sp[i] - ~cc[i]; the top digit W is c[W] - ~cc[W].
// The slice structure (a full adder fed by a digit's negabit through an
// inverter and by the carry from below) follows the published BSD slice
// adder this architecture builds on; the exact two-full-adder equations
// are this implementation's own.  The sum has W+1 digits, and its top digit is zero whenever both
// operands' top digits are zero, so callers that leave headroom may drop it.
// Purely combinational.
module bsd_adder #(
  parameter int unsigned W = 8
) (
  input  logic [W-1:0] xp, xn,
  input  logic [W-1:0] yp, yn,
  output logic [W:0]   sp, sn
);
  logic [W:0] c;    // FA1 carries, posibits
  logic [W:0] cc;   // FA2 carries, inverted negabits
  logic [W-1:0] s1;

  assign c[0]  = 1'b0;
  assign cc[0] = 1'b1;   // inverted negabit of value 0

  for (genvar i = 0; i < W; i++) begin : g_slice
    assign {c[i+1],  s1[i]} = {1'b0, xp[i]} + {1'b0, yp[i]} + {1'b0, ~xn[i]};
    assign {cc[i+1], sp[i]} = {1'b0, s1[i]} + {1'b0, ~yn[i]} + {1'b0, c[i]};
    assign sn[i] = ~cc[i];
  end
  assign sp[W] = c[W];
  assign sn[W] = ~cc[W];
endmodule
