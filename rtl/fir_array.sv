// fir_array: datapath of the sequential 64-tap FIR filter.
//
// The last O input samples sit in a chain of D registers: taps[0] is the
// input register holding x[n], taps[k] holds x[n-k]. A shift pulse moves the
// chain one place and loads x into taps[0]. The O coefficients arrive in
// parallel (O x NC bits) from the coefficient storage.
//
// One multiplier and one adder are shared by all taps. Each clock with
// mac_en high, two multiplexers pick taps[sel] and coeffs[sel], the product
// is sign-extended to NY+LOG2O bits and added to the accumulator (or to zero
// when first is high, which starts a new sum). The adder result is written
// to the accumulator, and, on the cycle with y_load high, to the output
// register y as well, so the finished sum appears on y one clock after the
// last tap is processed, with no extra cycle to copy the accumulator.
//
// zero (and rst) clear the input/delay-line registers, the accumulator and
// the output register on the next rising edge, as the specification of the
// filter's clear signal asks. Multiplexed single-MAC structure, widths and
// clear follow the specification; tap order, the unregistered product and
// loading y straight from the adder are this design's choices.
module fir_array #(
  parameter int unsigned O     = fir_pkg::O_DEF,
  parameter int unsigned LOG2O = fir_pkg::LOG2O_DEF,
  parameter int unsigned NX    = fir_pkg::NX_DEF,
  parameter int unsigned NC    = fir_pkg::NC_DEF,
  parameter int unsigned NY    = fir_pkg::NY_DEF
) (
  input  logic                      clk,
  input  logic                      rst,
  input  logic                      zero,
  input  logic                      shift,
  input  logic signed [NX-1:0]      x,
  input  logic [O-1:0][NC-1:0]      coeffs,
  input  logic [LOG2O-1:0]          sel,
  input  logic                      first,
  input  logic                      mac_en,
  input  logic                      y_load,
  output logic signed [NY+LOG2O-1:0] y
);
  localparam int unsigned WY = NY + LOG2O;

  logic clr;
  assign clr = rst | zero;

  // input register and delay line
  logic [O-1:0][NX-1:0] taps;
  logic [O-1:0][NX-1:0] taps_d;   // what each register loads on a shift
  always_comb taps_d = {taps[O-2:0], NX'(x)};
  for (genvar k = 0; k < O; k++) begin : g_tap
    fir_dff #(.W(NX)) u_tap (
      .clk (clk),
      .clr (clr),
      .en  (shift),
      .d   (taps_d[k]),
      .q   (taps[k])
    );
  end

  // tap selection
  logic [NX-1:0] x_sel;
  logic [NC-1:0] b_sel;
  fir_mux #(.N(O), .W(NX), .SW(LOG2O)) u_xmux (.d(taps),   .sel(sel), .q(x_sel));
  fir_mux #(.N(O), .W(NC), .SW(LOG2O)) u_bmux (.d(coeffs), .sel(sel), .q(b_sel));

  // shared multiplier and adder
  logic signed [NX+NC-1:0] prod;
  fir_mult #(.NX(NX), .NC(NC)) u_mult (.a(x_sel), .b(b_sel), .p(prod));

  logic signed [WY-1:0] acc, acc_in, sum;
  always_comb acc_in = first ? '0 : acc;
  fir_adder #(.W(WY)) u_add (.a(acc_in), .b(WY'(prod)), .s(sum));

  fir_dff #(.W(WY)) u_acc  (.clk(clk), .clr(clr), .en(mac_en),          .d(sum), .q(acc));
  fir_dff #(.W(WY)) u_yreg (.clk(clk), .clr(clr), .en(mac_en & y_load), .d(sum), .q(y));
endmodule
