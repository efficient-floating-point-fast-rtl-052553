// tb_fp_bsd_mult: random BSD multiplicands times random Modified Booth
// multipliers; the redundant product must equal the integer product of the
// two digit-string values exactly, and the exponent must be b_e + w_e - 127.
// A second instance with a 14-digit significand has eight partial products,
// the size of the textbook reduction example: three adder levels of 4, 2
// and 1 adders; it gets the same exact check.
module tb_fp_bsd_mult;
  import tb_util_pkg::*;
  int checks = 0, failures = 0;
  logic clk = 0;
  always #5 clk = ~clk;

  logic [7:0] b_e, w_e;  logic [23:0] b_p, b_n;  logic [25:0] w_p, w_n;
  logic signed [9:0] p_e;  logic [53:0] prod_p, prod_n;

  fp_bsd_mult dut (.b_e(b_e), .b_p(b_p), .b_n(b_n), .w_e(w_e), .w_p(w_p), .w_n(w_n),
                   .p_e(p_e), .prod_p(prod_p), .prod_n(prod_n));

  logic [13:0] b8_p, b8_n;  logic [15:0] w8_p, w8_n;
  logic signed [9:0] p8_e;  logic [33:0] prod8_p, prod8_n;

  fp_bsd_mult #(.N(14)) dut8 (.b_e(b_e), .b_p(b8_p), .b_n(b8_n), .w_e(w_e), .w_p(w8_p), .w_n(w8_n),
                              .p_e(p8_e), .prod_p(prod8_p), .prod_n(prod8_n));

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [63:0] p, n, wp, wn;
    for (int k = 0; k < 4000; k++) begin
      rand_bsd(p, n, 24);
      rand_mbe(wp, wn, 26);
      if (k == 0) begin p = 64'hffffff; n = 0; wp = 64'h2aaaaaa; wn = 0; end        // max * max
      if (k == 1) begin p = 0; n = 64'hffffff; wp = 64'h2aaaaaa; wn = 64'h2aaaaaa; end
      b_p = p[23:0]; b_n = n[23:0]; w_p = wp[25:0]; w_n = wn[25:0];
      b_e = 8'($urandom); w_e = 8'($urandom);
      #1;
      checks++;
      if (bsd_int(64'(prod_p), 64'(prod_n), 54) != bsd_int(p, n, 24) * mbe_int(wp, wn, 26)) begin
        failures++;
        if (failures < 5) $display("product mismatch k=%0d", k);
      end
      checks++;
      if (int'(p_e) != int'(b_e) + int'(w_e) - 127) failures++;
    end

    // eight partial products: three levels
    checks++;
    if (dut8.K != 8 || dut8.LV != 3) begin
      failures++;
      $display("eight-operand tree has %0d operands in %0d levels", dut8.K, dut8.LV);
    end
    for (int k = 0; k < 2000; k++) begin
      rand_bsd(p, n, 14);
      rand_mbe(wp, wn, 16);
      if (k == 0) begin p = 64'h3fff; n = 0; wp = 64'haaaa; wn = 0; end
      if (k == 1) begin p = 0; n = 64'h3fff; wp = 64'haaaa; wn = 64'haaaa; end
      b8_p = p[13:0]; b8_n = n[13:0]; w8_p = wp[15:0]; w8_n = wn[15:0];
      b_e = 8'($urandom); w_e = 8'($urandom);
      #1;
      checks++;
      if (bsd_int(64'(prod8_p), 64'(prod8_n), 34) != bsd_int(p, n, 14) * mbe_int(wp, wn, 16)) begin
        failures++;
        if (failures < 5) $display("14-digit product mismatch k=%0d", k);
      end
      checks++;
      if (int'(p8_e) != int'(b_e) + int'(w_e) - 127) failures++;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
