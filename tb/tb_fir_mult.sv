// tb_fir_mult: exhaustive self-checking test of the 8x8 signed multiplier.
// Every pair of signed 8-bit operands is applied; the 16-bit product must
// equal the integer product.
module tb_fir_mult;
  logic clk = 1'b0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic signed [7:0]  a, b;
  logic signed [15:0] p;
  fir_mult #(.NX(8), .NC(8)) dut (.a(a), .b(b), .p(p));

  initial begin
    for (int i = -128; i < 128; i++) begin
      for (int j = -128; j < 128; j++) begin
        a = 8'(i); b = 8'(j);
        #1;
        checks++;
        if (int'(p) != i * j) begin
          failures++;
          if (failures < 10) $display("FAIL %0d * %0d = %0d", i, j, p);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
