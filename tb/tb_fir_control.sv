// tb_fir_control: self-checking test of the multiply-accumulate sequencer.
// A cycle-by-cycle reference (written independently) predicts every output
// while the testbench offers samples idle, back to back (on the last tap),
// while busy (must stall), and applies zero in the middle of a sweep. It also
// measures that y_valid comes exactly 64 clocks after the accepting edge.
module tb_fir_control;
  localparam int O = 64;
  logic clk = 1'b0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic rst, zero, x_valid;
  logic x_ready, shift, first, mac_en, y_load, y_valid, busy;
  logic [5:0] sel;

  fir_control dut (.clk, .rst, .zero, .x_valid, .x_ready, .shift, .sel, .first,
                   .mac_en, .y_load, .y_valid, .busy);

  // reference state
  int  r_tap;         // -1 when idle, else tap index
  bit  r_yv;
  int  accept_cycle, cycle;
  int  n_accept = 0, n_overlap = 0, n_stall = 0, n_abort = 0, n_out = 0;

  always @(posedge clk) cycle <= cycle + 1;

  task automatic compare();
    bit e_mac = (r_tap >= 0);
    bit e_last = e_mac && r_tap == O - 1;
    bit e_ready = !e_mac || e_last;
    bit e_shift = x_valid && e_ready && !zero;
    checks++;
    if (mac_en !== e_mac || busy !== e_mac || x_ready !== e_ready || shift !== e_shift ||
        y_load !== e_last || first !== (e_mac && r_tap == 0) || y_valid !== r_yv ||
        (e_mac && sel !== 6'(r_tap))) begin
      failures++;
      $display("FAIL t=%0t tap=%0d mac=%b rdy=%b sh=%b sel=%0d first=%b yl=%b yv=%b",
               $time, r_tap, mac_en, x_ready, shift, sel, first, y_load, y_valid);
    end
  endtask

  task automatic step();
    bit e_mac = (r_tap >= 0);
    bit e_last = e_mac && r_tap == O - 1;
    bit e_shift = x_valid && (!e_mac || e_last) && !zero;
    #1 compare();
    if (x_valid && !(!e_mac || e_last)) n_stall++;
    if (e_shift && e_last) n_overlap++;
    if (e_last && !zero) n_out++;
    @(posedge clk);
    if (rst || zero) begin
      if (zero && e_mac) n_abort++;
      r_tap = -1; r_yv = 0;
    end else begin
      r_yv = e_last;
      if (e_shift) begin r_tap = 0; n_accept++; end
      else if (e_last) r_tap = -1;
      else if (e_mac) r_tap++;
    end
    #1;
    if (y_valid) begin
      checks++;
      if (cycle - accept_cycle != O) begin
        failures++;
        $display("FAIL latency %0d", cycle - accept_cycle);
      end
    end
    if (e_shift && !rst) accept_cycle = cycle;
  endtask

  initial begin
    cycle = 0;
    rst = 1; zero = 0; x_valid = 0; r_tap = -1; r_yv = 0;
    @(posedge clk); @(posedge clk);
    #2 rst = 0;
    // single sample, then idle
    x_valid = 1; step(); x_valid = 0;
    repeat (70) step();
    // back-to-back stream with x_valid held high (stalls while busy)
    x_valid = 1;
    repeat (4 * O + 3) step();
    x_valid = 0;
    repeat (10) step();
    // zero in the middle of a sweep
    x_valid = 1; step(); x_valid = 0;
    repeat (20) step();
    zero = 1; step(); zero = 0;
    repeat (O + 5) step();
    // zero while a sample is offered: not taken
    zero = 1; x_valid = 1; step(); zero = 0; x_valid = 0;
    repeat (3) step();
    // random traffic
    for (int i = 0; i < 2000; i++) begin
      x_valid = ($urandom % 3) == 0;
      zero    = ($urandom % 500) == 0;
      step();
    end
    x_valid = 0; zero = 0;
    repeat (O + 2) step();
    checks++;
    if (n_overlap == 0 || n_stall == 0 || n_abort == 0 || n_out < 5) begin
      failures++;
      $display("FAIL coverage overlap=%0d stall=%0d abort=%0d out=%0d", n_overlap, n_stall, n_abort, n_out);
    end
    $display("accepted=%0d outputs=%0d overlaps=%0d stalls=%0d aborts=%0d",
             n_accept, n_out, n_overlap, n_stall, n_abort);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
