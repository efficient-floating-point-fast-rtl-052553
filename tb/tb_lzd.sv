// tb_lzd: checks the leading zero detector (64 and 8 bits) against a
// counting loop, for every leading-zero count and for an all-zero input.
module tb_lzd;
  int checks = 0, failures = 0;
  logic clk = 0;
  always #5 clk = ~clk;

  logic [63:0] a;  logic [5:0] cnt;  logic zero;
  logic [7:0]  b;  logic [2:0] cntb; logic zerob;
  lzd #(.W(64)) dut  (.a(a), .cnt(cnt),  .zero(zero));
  lzd #(.W(8))  dut8 (.a(b), .cnt(cntb), .zero(zerob));

  function automatic int ref_lz(logic [63:0] v, int w);
    for (int i = w - 1; i >= 0; i--) if (v[i]) return w - 1 - i;
    return w;
  endfunction

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int k = 0; k < 64; k++)
      for (int r = 0; r < 20; r++) begin
        a = {$urandom, $urandom};
        a = (a | 64'h1) >> k;
        a[63-k] = 1'b1;
        #1;
        checks++;
        if (zero || int'(cnt) != ref_lz(a, 64)) begin
          failures++;
          if (failures < 5) $display("lz mismatch a=%h cnt=%0d exp=%0d", a, cnt, ref_lz(a, 64));
        end
      end
    a = '0; #1;
    checks++; if (!zero) failures++;
    for (int v = 0; v < 256; v++) begin
      b = 8'(v); #1;
      checks++;
      if (v == 0) begin
        if (!zerob) failures++;
      end else if (zerob || int'(cntb) != ref_lz(64'(v), 8)) failures++;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
