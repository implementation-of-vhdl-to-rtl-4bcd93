// tb_fir_top: end-to-end self-checking test of the 64-tap FIR filter at its
// default sizes (64 taps, 8-bit samples and coefficients, 22-bit output).
//
// A reference model, clocked alongside the filter, records every sample the
// filter takes, computes sum_k b[k] x[n-k] from its own copy of the
// coefficients and sample history, and checks each y_valid result and its
// latency (64 clocks after the accepting edge). The stimulus loads the
// coefficients over the bus, reads them back, tries addresses outside the
// coefficient window, runs an impulse (the output must replay b[0..63]), a
// full-scale input (largest possible sum), a back-to-back stream (one output
// every 64 clocks, the next sample taken on the last tap), samples offered
// while busy (stall), and zero both while idle and in the middle of a sweep.
// Each of these mechanisms is counted, and one that never happened counts as
// a failure.
module tb_fir_top;
  localparam int O = 64;
  localparam logic [15:0] BASE = 16'hFFC0;
  logic clk = 1'b0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic        rst, zero, x_valid, x_ready, y_valid, busy, c_wr, c_rd, c_ack;
  logic signed [7:0]  x;
  logic signed [21:0] y;
  logic [15:0] c_addr;
  logic [7:0]  c_wdata, c_rdata;

  fir_top dut (.clk, .rst, .zero, .x_valid, .x_ready, .x, .y, .y_valid, .busy,
               .c_addr, .c_wr, .c_rd, .c_wdata, .c_rdata, .c_ack);

  // ---------------- reference model ----------------
  int model_b [O];
  int hist [O];
  int exp_q [$];
  int acc_cycle_q [$];
  int cycle = 0;
  int last_out_cycle = -1;
  int n_out = 0;
  // mechanism counters
  int n_wr = 0, n_rd = 0, n_miss = 0, n_idle_accept = 0, n_b2b = 0, n_stall = 0,
      n_zero_idle = 0, n_zero_abort = 0, n_rate = 0, n_full_scale = 0, n_impulse = 0;

  task automatic chk(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL @%0t %s", $time, what); end
  endtask

  always @(posedge clk) begin
    cycle <= cycle + 1;
    if (!rst) begin
      // output side (values before this edge)
      if (y_valid) begin
        n_out++;
        if (exp_q.size() == 0) chk(0, "unexpected y_valid");
        else begin
          int e, a;
          e = exp_q.pop_front();
          a = acc_cycle_q.pop_front();
          chk(int'(y) == e, $sformatf("y=%0d expected %0d", y, e));
          chk(cycle - a == O, $sformatf("latency %0d, expected %0d", cycle - a, O));
          if (last_out_cycle >= 0 && cycle - last_out_cycle == O) n_rate++;
          if (e == O * 16384) n_full_scale++;
          last_out_cycle = cycle;
        end
      end
      // input side
      if (zero) begin
        if (busy) n_zero_abort++; else n_zero_idle++;
        for (int k = 0; k < O; k++) hist[k] = 0;
        exp_q.delete();
        acc_cycle_q.delete();
      end else if (x_valid && !x_ready) begin
        n_stall++;
      end else if (x_valid && x_ready) begin
        int s;
        if (busy) n_b2b++; else n_idle_accept++;
        for (int k = O - 1; k > 0; k--) hist[k] = hist[k-1];
        hist[0] = int'(x);
        s = 0;
        for (int k = 0; k < O; k++) s += model_b[k] * hist[k];
        exp_q.push_back(s);
        acc_cycle_q.push_back(cycle + 1);
      end
      if (c_wr && c_addr >= BASE) model_b[6'(c_addr - BASE)] = int'($signed(c_wdata));
    end
  end

  // ---------------- stimulus ----------------
  // taken_q: the sample on x was taken at the last edge
  logic taken_q = 1'b0;
  always @(posedge clk) taken_q <= x_valid && x_ready && !zero;

  task automatic tick();
    @(posedge clk); #1;
  endtask

  task automatic write_b(input int i, input int v);
    c_addr = BASE + 16'(i); c_wdata = 8'(v); c_wr = 1;
    tick();
    c_wr = 0;
    chk(c_ack === 1'b1, "write acknowledged");
    n_wr++;
  endtask

  task automatic read_b(input int i);
    c_addr = BASE + 16'(i); c_rd = 1;
    tick();
    c_rd = 0;
    chk(c_ack === 1'b1 && int'($signed(c_rdata)) == model_b[i],
        $sformatf("read b[%0d]=%0d expected %0d", i, $signed(c_rdata), model_b[i]));
    n_rd++;
  endtask

  // offer one sample and hold it until it is taken
  task automatic offer(input int v);
    x = 8'(v); x_valid = 1;
    do tick(); while (!taken_q);
    x_valid = 0;
  endtask


  task automatic wait_idle();
    while (busy || y_valid) tick();
    tick();
  endtask

  task automatic pulse_zero();
    zero = 1; tick(); zero = 0;
    chk(y === '0, "zero clears the output register");
  endtask

  initial begin
    rst = 1; zero = 0; x_valid = 0; x = 0; c_wr = 0; c_rd = 0; c_addr = 0; c_wdata = 0;
    for (int k = 0; k < O; k++) begin model_b[k] = 0; hist[k] = 0; end
    repeat (3) tick();
    rst = 0;
    chk(y === '0 && !y_valid && x_ready, "reset state");

    // load coefficients: a decreasing ramp, then read them back
    for (int i = 0; i < O; i++) write_b(i, 64 - 2 * i);
    for (int i = 0; i < O; i++) read_b(i);
    // outside the window: ignored, not acknowledged
    c_addr = BASE - 16'd1; c_wdata = 8'h7F; c_wr = 1; tick(); c_wr = 0;
    chk(c_ack === 1'b0, "no ack outside the window"); n_miss++;
    c_addr = 16'h1234; c_rd = 1; tick(); c_rd = 0;
    chk(c_ack === 1'b0, "no ack outside the window"); n_miss++;
    read_b(0);

    // impulse response: outputs replay b[0..63]
    offer(1);
    for (int k = 1; k < O + 2; k++) offer(0);
    wait_idle();
    n_impulse++;

    // random coefficients, random samples with idle gaps
    for (int i = 0; i < O; i++) write_b(i, int'($signed(8'($urandom))));
    read_b(17);
    for (int n = 0; n < 30; n++) begin
      offer(int'($signed(8'($urandom))));
      repeat ($urandom % 80) tick();
    end
    wait_idle();

    // back-to-back stream: x_valid held high, the filter stalls it
    for (int n = 0; n < 40; n++) offer(int'($signed(8'($urandom))));
    wait_idle();

    // zero in the middle of a sweep, then while idle
    offer(100);
    repeat (20) tick();
    pulse_zero();
    chk(!busy, "zero stops the sweep");
    repeat (O + 5) tick();
    chk(n_out > 0, "outputs seen");
    pulse_zero();
    offer(-5);
    wait_idle();

    // full scale: all coefficients and samples -128, sum = 64 * 16384
    for (int i = 0; i < O; i++) write_b(i, -128);
    for (int n = 0; n < O; n++) offer(-128);
    wait_idle();
    // most negative: coefficients 127, samples -128
    for (int i = 0; i < O; i++) write_b(i, 127);
    for (int n = 0; n < O; n++) offer(-128);
    wait_idle();

    chk(exp_q.size() == 0, "every sample produced an output");
    $display("outputs=%0d writes=%0d reads=%0d misses=%0d idle_accepts=%0d back_to_back=%0d",
             n_out, n_wr, n_rd, n_miss, n_idle_accept, n_b2b);
    $display("stalls=%0d zero_idle=%0d zero_abort=%0d rate_64=%0d full_scale=%0d impulse=%0d",
             n_stall, n_zero_idle, n_zero_abort, n_rate, n_full_scale, n_impulse);
    chk(n_wr > 0 && n_rd > 0 && n_miss > 0, "bus mechanisms exercised");
    chk(n_idle_accept > 0 && n_b2b > 0 && n_stall > 0, "handshake mechanisms exercised");
    chk(n_zero_idle > 0 && n_zero_abort > 0, "zero exercised idle and mid-sweep");
    chk(n_rate > 0, "one output per 64 clocks seen");
    chk(n_full_scale > 0 && n_impulse > 0, "full-scale and impulse inputs exercised");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (40000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
