// tb_fir_mux: self-checking test of the 64-to-1 word multiplexer, plus a
// 5-input instance whose out-of-range selects must give zero.
module tb_fir_mux;
  logic clk = 1'b0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic [63:0][7:0] d;
  logic [5:0]       sel;
  logic [7:0]       q;
  fir_mux #(.N(64), .W(8)) dut (.d(d), .sel(sel), .q(q));

  logic [4:0][7:0] d5;
  logic [2:0]      sel5;
  logic [7:0]      q5;
  fir_mux #(.N(5), .W(8)) dut5 (.d(d5), .sel(sel5), .q(q5));

  logic [7:0] ref_words [64];

  initial begin
    for (int r = 0; r < 20; r++) begin
      for (int i = 0; i < 64; i++) begin
        ref_words[i] = 8'($urandom);
        d[i] = ref_words[i];
      end
      for (int s = 0; s < 64; s++) begin
        sel = 6'(s);
        #1;
        checks++;
        if (q !== ref_words[s]) begin
          failures++;
          $display("FAIL sel=%0d q=%h exp=%h", s, q, ref_words[s]);
        end
      end
    end
    for (int i = 0; i < 5; i++) d5[i] = 8'(8'h11 * (i + 1));
    for (int s = 0; s < 8; s++) begin
      sel5 = 3'(s);
      #1;
      checks++;
      if (q5 !== ((s < 5) ? 8'(8'h11 * (s + 1)) : 8'h00)) begin
        failures++;
        $display("FAIL N=5 sel=%0d q=%h", s, q5);
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
