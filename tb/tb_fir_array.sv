// tb_fir_array: self-checking test of the FIR datapath on its own.
// The testbench plays the sequencer: it shifts a sample in, then steps sel
// over all 64 taps (first on tap 0, y_load on tap 63) and compares y with
// sum_k b[k] x[n-k] computed from its own copy of the sample history. It
// uses random, all-extreme (-128 x -128 on every tap, the largest possible
// sum) and impulse inputs, applies zero and checks that delay line and
// output are cleared, and checks that y holds while no sweep runs.
module tb_fir_array;
  localparam int O = 64;
  logic clk = 1'b0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic rst, zero, shift, first, mac_en, y_load;
  logic signed [7:0] x;
  logic [O-1:0][7:0] coeffs;
  logic [5:0] sel;
  logic signed [21:0] y;

  fir_array dut (.clk, .rst, .zero, .shift, .x, .coeffs, .sel, .first, .mac_en, .y_load, .y);

  int hist [O];     // hist[k] = x[n-k]

  function automatic int expected();
    int s = 0;
    for (int k = 0; k < O; k++) s += hist[k] * int'($signed(coeffs[k]));
    return s;
  endfunction

  task automatic push(input int v);
    for (int k = O - 1; k > 0; k--) hist[k] = hist[k-1];
    hist[0] = v;
    x = 8'(v); shift = 1;
    @(posedge clk); #1;
    shift = 0;
  endtask

  task automatic sweep();
    for (int k = 0; k < O; k++) begin
      sel = 6'(k); mac_en = 1; first = (k == 0); y_load = (k == O - 1);
      @(posedge clk); #1;
    end
    mac_en = 0; first = 0; y_load = 0;
    checks++;
    if (int'(y) != expected()) begin
      failures++;
      $display("FAIL y=%0d exp=%0d", y, expected());
    end
  endtask

  initial begin
    rst = 1; zero = 0; shift = 0; first = 0; mac_en = 0; y_load = 0; x = 0; sel = 0;
    for (int k = 0; k < O; k++) begin hist[k] = 0; coeffs[k] = 8'($urandom); end
    @(posedge clk); #1 rst = 0;
    // random samples
    for (int n = 0; n < 100; n++) begin
      push(int'($signed(8'($urandom))));
      sweep();
    end
    // y holds while idle
    repeat (5) @(posedge clk);
    #1 checks++;
    if (int'(y) != expected()) begin failures++; $display("FAIL y did not hold"); end
    // largest sum: all -128
    for (int k = 0; k < O; k++) coeffs[k] = 8'h80;
    for (int n = 0; n < O; n++) push(-128);
    sweep();
    checks++;
    if (int'(y) != 64 * 16384) begin failures++; $display("FAIL max sum %0d", y); end
    // most negative: -128 x 127
    for (int k = 0; k < O; k++) coeffs[k] = 8'h7F;
    push(-128);
    sweep();
    // zero clears delay line and output
    zero = 1; @(posedge clk); #1 zero = 0;
    for (int k = 0; k < O; k++) hist[k] = 0;
    checks++;
    if (y !== '0) begin failures++; $display("FAIL zero did not clear y"); end
    sweep();  // all-zero history -> 0
    // impulse response: y after k further zeros equals b[k]
    for (int k = 0; k < O; k++) coeffs[k] = 8'($urandom);
    push(1);
    sweep();
    for (int k = 1; k < 10; k++) begin
      push(0);
      sweep();
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
