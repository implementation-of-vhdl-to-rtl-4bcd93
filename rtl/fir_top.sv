// fir_top: generic sequential FIR filter, y[n] = sum_{k=0}^{O-1} b[k] x[n-k],
// with 64 taps, 8-bit signed samples and coefficients and a 22-bit output.
//
// Three blocks: coeff_storage holds the coefficients in a register array that
// a host reads and writes over a small address/data bus; fir_array holds the
// input and delay-line registers and the one shared multiplier and adder;
// fir_control steps that multiplier across the taps, one per clock.
//
// Samples: offer x with x_valid; it is taken on a clock edge where x_ready is
// high. y then updates, and y_valid pulses, O = 64 clocks later. x_ready is
// high while idle and on the last tap of a sweep, so one sample per 64 clocks
// can stream in. zero clears the input, delay-line and output registers (and
// stops a running sweep) on the next rising edge; rst also clears the
// coefficients. Coefficient b[i] is at bus address COEFF_BASE + i; see
// coeff_storage for the bus timing. All inputs are sampled on the rising
// edge of clk; all outputs are registered.
module fir_top #(
  parameter int unsigned O      = fir_pkg::O_DEF,
  parameter int unsigned LOG2O  = fir_pkg::LOG2O_DEF,
  parameter int unsigned NX     = fir_pkg::NX_DEF,
  parameter int unsigned NC     = fir_pkg::NC_DEF,
  parameter int unsigned NY     = NX + NC,
  parameter int unsigned ADDR_W = fir_pkg::ADDR_W_DEF,
  parameter logic [ADDR_W-1:0] COEFF_BASE = ADDR_W'(fir_pkg::COEFF_BASE_DEF)
) (
  input  logic                       clk,
  input  logic                       rst,
  input  logic                       zero,
  // sample stream
  input  logic                       x_valid,
  output logic                       x_ready,
  input  logic signed [NX-1:0]       x,
  output logic signed [NY+LOG2O-1:0] y,
  output logic                       y_valid,
  output logic                       busy,
  // coefficient bus
  input  logic [ADDR_W-1:0]          c_addr,
  input  logic                       c_wr,
  input  logic                       c_rd,
  input  logic [NC-1:0]              c_wdata,
  output logic [NC-1:0]              c_rdata,
  output logic                       c_ack
);
  logic [O-1:0][NC-1:0] coeffs;
  logic                 shift, first, mac_en, y_load;
  logic [LOG2O-1:0]     sel;

  coeff_storage #(.O(O), .NC(NC), .ADDR_W(ADDR_W), .COEFF_BASE(COEFF_BASE)) u_coeff (
    .clk, .rst, .c_addr, .c_wr, .c_rd, .c_wdata, .c_rdata, .c_ack, .coeffs
  );

  fir_control #(.O(O), .LOG2O(LOG2O)) u_ctrl (
    .clk, .rst, .zero, .x_valid, .x_ready, .shift, .sel, .first, .mac_en,
    .y_load, .y_valid, .busy
  );

  fir_array #(.O(O), .LOG2O(LOG2O), .NX(NX), .NC(NC), .NY(NY)) u_array (
    .clk, .rst, .zero, .shift, .x, .coeffs, .sel, .first, .mac_en, .y_load, .y
  );
endmodule
