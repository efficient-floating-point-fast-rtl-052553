// tb_mbe_wallace_mult: all 65536 signed operand pairs, one per clock, each
// product checked one clock after its operands are applied.
module tb_mbe_wallace_mult;
  int checks = 0, failures = 0;
  logic clock = 0;
  always #5 clock = ~clock;

  logic [7:0] x, y;  logic [15:0] product;
  mbe_wallace_mult dut (.clock(clock), .x(x), .y(y), .product(product));

  initial begin
    repeat (70000) @(posedge clock);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic signed [15:0] expv;
    x = 0; y = 0;
    for (int a = -128; a < 128; a++)
      for (int b = -128; b < 128; b++) begin
        x = 8'(a);
        y = 8'(b);
        @(posedge clock);   // product registered on this edge
        #1;
        expv = 16'(a * b);
        checks++;
        if (product !== expv) begin
          failures++;
          if (failures < 5) $display("mismatch %0d*%0d got %0d", a, b, $signed(product));
        end
      end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
