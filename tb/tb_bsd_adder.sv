// tb_bsd_adder: checks the carry-limited BSD adder at two widths against
// integer sums of random digit strings (including digits coded 1/1), and
// that the top sum digit stays zero when both top input digits are zero.
module tb_bsd_adder;
  import tb_util_pkg::*;
  int checks = 0, failures = 0;
  logic clk = 0;
  always #5 clk = ~clk;

  localparam int W1 = 8, W2 = 54;
  logic [W1-1:0] ap, an, bp, bn;  logic [W1:0] sp, sn;
  logic [W2-1:0] cp, cn, dp, dn;  logic [W2:0] tp, tn;

  bsd_adder #(.W(W1)) dut1 (.xp(ap), .xn(an), .yp(bp), .yn(bn), .sp(sp), .sn(sn));
  bsd_adder #(.W(W2)) dut2 (.xp(cp), .xn(cn), .yp(dp), .yn(dn), .sp(tp), .sn(tn));

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [63:0] p0, n0, p1, n1;
    // exhaustive over 4-bit codes per operand at W1: random but dense
    for (int k = 0; k < 20000; k++) begin
      {ap, an, bp, bn} = {$urandom, $urandom};
      #1;
      checks++;
      if (bsd_int(64'(sp), 64'(sn), W1+1) != bsd_int(64'(ap), 64'(an), W1) + bsd_int(64'(bp), 64'(bn), W1)) begin
        failures++;
        if (failures < 5) $display("W1 mismatch a=%h/%h b=%h/%h s=%h/%h", ap, an, bp, bn, sp, sn);
      end
    end
    for (int k = 0; k < 5000; k++) begin
      rand_bsd(p0, n0, W2 - 1);
      rand_bsd(p1, n1, W2 - 1);
      {cp, cn, dp, dn} = {p0[W2-1:0], n0[W2-1:0], p1[W2-1:0], n1[W2-1:0]};
      #1;
      checks++;
      if (bsd_int(64'(tp), 64'(tn), W2+1) != bsd_int(p0, n0, W2) + bsd_int(p1, n1, W2)) begin
        failures++;
        if (failures < 5) $display("W2 mismatch");
      end
      checks++;
      if (tp[W2] || tn[W2]) failures++;   // headroom: top digit must stay zero
    end
    // extremes: all +1 plus all +1, all -1 plus all -1
    {ap, an, bp, bn} = {8'hff, 8'h00, 8'hff, 8'h00}; #1;
    checks++; if (bsd_int(64'(sp), 64'(sn), W1+1) != 510) failures++;
    {ap, an, bp, bn} = {8'h00, 8'hff, 8'h00, 8'hff}; #1;
    checks++; if (bsd_int(64'(sp), 64'(sn), W1+1) != -510) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
