// tb_fir_dff: self-checking test of the enable/clear D register.
// Random clr, en and d each clock; a reference register in the testbench
// predicts q (clear wins, then load, else hold).
module tb_fir_dff;
  logic clk = 1'b0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic       clr, en;
  logic [7:0] d, q, q_ref;
  fir_dff #(.W(8)) dut (.clk(clk), .clr(clr), .en(en), .d(d), .q(q));

  initial begin
    clr = 1'b1; en = 1'b0; d = 8'hA5;
    @(posedge clk); #1;
    q_ref = '0;
    checks++;
    if (q !== 8'h00) begin failures++; $display("FAIL clear"); end
    for (int i = 0; i < 1000; i++) begin
      clr = ($urandom % 8) == 0;
      en  = ($urandom % 2) == 0;
      d   = 8'($urandom);
      @(posedge clk); #1;
      if (clr)     q_ref = '0;
      else if (en) q_ref = d;
      checks++;
      if (q !== q_ref) begin
        failures++;
        $display("FAIL cycle %0d q=%h exp=%h", i, q, q_ref);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
