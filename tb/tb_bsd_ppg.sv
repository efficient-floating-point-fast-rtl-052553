// tb_bsd_ppg: applies the five selections of the partial-product table
// (0, B, -B, 2B, -2B) to random BSD multiplicands and checks the value.
module tb_bsd_ppg;
  import tb_util_pkg::*;
  int checks = 0, failures = 0;
  logic clk = 0;
  always #5 clk = ~clk;

  logic [23:0] bp, bn;  logic w1p, w1n, w0p, w0n;  logic [24:0] pp_p, pp_n;
  bsd_ppg #(.N(24)) dut (.bp(bp), .bn(bn), .w1p(w1p), .w1n(w1n), .w0p(w0p), .w0n(w0n),
                         .pp_p(pp_p), .pp_n(pp_n));

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [63:0] p, n;
    // {w1n,w1p,w0n,w0p} and the multiple of B each selects
    logic [3:0] code [5] = '{4'b0000, 4'b0001, 4'b0011, 4'b0100, 4'b1100};
    int         mult [5] = '{0, 1, -1, 2, -2};
    for (int k = 0; k < 2000; k++) begin
      rand_bsd(p, n, 24);
      bp = p[23:0];
      bn = n[23:0];
      for (int s = 0; s < 5; s++) begin
        {w1n, w1p, w0n, w0p} = code[s];
        #1;
        checks++;
        if (bsd_int(64'(pp_p), 64'(pp_n), 25) != longint'(mult[s]) * bsd_int(p, n, 24)) begin
          failures++;
          if (failures < 5) $display("pp mismatch sel=%0d", s);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
