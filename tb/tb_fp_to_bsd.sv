// tb_fp_to_bsd: converts random single precision bit patterns and checks
// exponent, digit value and sign against the IEEE 754 field definitions.
module tb_fp_to_bsd;
  import bsd_pkg::*;
  import tb_util_pkg::*;
  int checks = 0, failures = 0;
  logic clk = 0;
  always #5 clk = ~clk;

  logic [31:0] f;  bsd_fp_t r;
  fp_to_bsd dut (.f(f), .r(r));

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    longint expv;
    for (int k = 0; k < 5000; k++) begin
      f = $urandom;
      if (k % 50 == 0) f[30:23] = 8'd0;   // zeros and subnormals
      #1;
      expv = (f[30:23] == 0) ? 0 : longint'({1'b1, f[22:0]});
      if (f[31]) expv = -expv;
      checks++;
      if (bsd_int(64'(r.p), 64'(r.n), 24) != expv || r.e != f[30:23]) begin
        failures++;
        if (failures < 5) $display("mismatch f=%h", f);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
