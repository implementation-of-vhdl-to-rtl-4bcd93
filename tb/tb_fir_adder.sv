// tb_fir_adder: self-checking test of the 22-bit signed adder.
// Drives corner values and random operands and compares s with a + b
// computed in 64-bit integer arithmetic and wrapped to 22 bits.
module tb_fir_adder;
  localparam int W = 22;
  logic clk = 1'b0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic signed [W-1:0] a, b, s;
  fir_adder #(.W(W)) dut (.a(a), .b(b), .s(s));

  task automatic check(input longint av, input longint bv);
    longint exp;
    a = W'(av); b = W'(bv);
    #1;
    exp = (longint'(a) + longint'(b));
    exp = longint'($signed(W'(exp)));
    checks++;
    if (longint'(s) != exp) begin
      failures++;
      $display("FAIL a=%0d b=%0d s=%0d exp=%0d", a, b, s, exp);
    end
  endtask

  initial begin
    check(0, 0);
    check(1, -1);
    check(16384, 16384);
    check(-(1 <<< 21), 0);
    check((1 <<< 20), (1 <<< 20) - 1);
    check(-32768, -32768);
    for (int i = 0; i < 2000; i++)
      check(longint'($signed(W'($urandom))), longint'($signed(W'($urandom))));
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
