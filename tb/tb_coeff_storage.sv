// tb_coeff_storage: self-checking test of the coefficient register array.
// Writes all 64 coefficients over the bus in random order, checks the
// parallel coeffs output after every write, reads every word back (data and
// acknowledge one clock after the strobe), checks that accesses just outside
// the window FFC0..FFFF change nothing and are not acknowledged, that a
// simultaneous write and read returns the old word, and that rst clears all.
module tb_coeff_storage;
  localparam int O = 64;
  localparam logic [15:0] BASE = 16'hFFC0;
  logic clk = 1'b0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic        rst, c_wr, c_rd, c_ack;
  logic [15:0] c_addr;
  logic [7:0]  c_wdata, c_rdata;
  logic [O-1:0][7:0] coeffs;
  logic [7:0]  model [O];

  coeff_storage dut (.clk, .rst, .c_addr, .c_wr, .c_rd, .c_wdata, .c_rdata, .c_ack, .coeffs);

  task automatic chk(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  task automatic check_all(input string what);
    bit ok = 1;
    for (int i = 0; i < O; i++) if (coeffs[i] !== model[i]) ok = 0;
    chk(ok, what);
  endtask

  task automatic bus(input logic [15:0] addr, input bit wr, input bit rd, input logic [7:0] wd);
    c_addr = addr; c_wr = wr; c_rd = rd; c_wdata = wd;
    @(posedge clk); #1;
    c_wr = 0; c_rd = 0;
  endtask

  initial begin
    int perm [O];
    rst = 1; c_wr = 0; c_rd = 0; c_addr = '0; c_wdata = '0;
    repeat (2) @(posedge clk); #1;
    rst = 0;
    for (int i = 0; i < O; i++) model[i] = '0;
    check_all("reset value");
    // random order writes
    for (int i = 0; i < O; i++) perm[i] = i;
    for (int i = O - 1; i > 0; i--) begin
      automatic int j = $urandom % (i + 1);
      automatic int t = perm[i]; perm[i] = perm[j]; perm[j] = t;
    end
    for (int i = 0; i < O; i++) begin
      logic [7:0] v;
      v = 8'($urandom);
      bus(BASE + 16'(perm[i]), 1, 0, v);
      model[perm[i]] = v;
      check_all($sformatf("write b[%0d]", perm[i]));
      chk(c_ack === 1'b1, "write ack");
    end
    // read back
    for (int i = 0; i < O; i++) begin
      bus(BASE + 16'(i), 0, 1, 8'h00);
      chk(c_rdata === model[i] && c_ack === 1'b1, $sformatf("read b[%0d] got %h exp %h", i, c_rdata, model[i]));
    end
    // outside the window
    bus(BASE - 16'd1, 1, 0, 8'h5A);
    check_all("write below window ignored");
    chk(c_ack === 1'b0, "no ack below window");
    bus(16'h0000, 1, 1, 8'h5A);
    check_all("write at 0000 ignored");
    chk(c_ack === 1'b0, "no ack at 0000");
    // simultaneous write and read of b[5]
    begin
      logic [7:0] old;
      old = model[5];
      bus(BASE + 16'd5, 1, 1, ~old);
      model[5] = ~old;
      chk(c_rdata === old, "read during write returns old word");
      check_all("write during read");
    end
    // last word at FFFF
    bus(16'hFFFF, 1, 0, 8'h81);
    model[O-1] = 8'h81;
    check_all("write b[63] at FFFF");
    // reset clears
    rst = 1; @(posedge clk); #1; rst = 0;
    for (int i = 0; i < O; i++) model[i] = '0;
    check_all("rst clears");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
