// tb_booth_recoder: checks that the Booth form of random and corner-case
// significands has the right value (sign included), at most one non-zero
// per position pair, and a sign flag only on non-zero positions.
module tb_booth_recoder;
  import tb_util_pkg::*;
  int checks = 0, failures = 0;
  logic clk = 0;
  always #5 clk = ~clk;

  logic [23:0] m;  logic sign;  logic [25:0] wp, wn;
  booth_recoder #(.N(24)) dut (.m(m), .sign(sign), .wp(wp), .wn(wn));

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check_one();
    longint expv;
    #1;
    expv = sign ? -longint'(m) : longint'(m);
    checks++;
    if (mbe_int(64'(wp), 64'(wn), 26) != expv) begin
      failures++;
      if (failures < 5) $display("value mismatch m=%h s=%0d", m, sign);
    end
    for (int j = 0; j < 13; j++) begin
      checks++;
      if (wp[2*j] && wp[2*j+1]) failures++;
    end
    checks++;
    if ((wn & ~wp) != 0) failures++;
  endtask

  initial begin
    m = 24'hffffff; sign = 0; check_one();
    m = 24'h800000; sign = 1; check_one();
    m = 24'haaaaaa; sign = 0; check_one();
    m = 24'h555555; sign = 1; check_one();
    m = 24'h000000; sign = 1; check_one();
    for (int k = 0; k < 5000; k++) begin
      m = 24'($urandom);
      sign = 1'($urandom);
      check_one();
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
