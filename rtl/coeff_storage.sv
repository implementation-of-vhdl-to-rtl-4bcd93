// coeff_storage: bus-accessible register array holding the O filter
// coefficients b[0..O-1].
//
// Coefficient b[i] sits at bus address COEFF_BASE + i (default window
// FFC0..FFFF for 64 coefficients of a 16-bit address space). A write
// (c_wr high for one clock with an address in the window) stores c_wdata at
// that clock edge. A read (c_rd high) returns the word on c_rdata one clock
// later, together with c_ack; an access outside the window is ignored and
// gives c_ack low. If c_wr and c_rd are both high the write is done and the
// read returns the old word. All O words are presented in parallel on
// coeffs (O x NC bits) to the filter datapath. rst clears every coefficient.
//
// That the coefficients live in an internal register array reached over a
// bus, and their number and width, follow the specification; the address
// map, the strobe/acknowledge protocol and the reset value are this design's
// own choices.
module coeff_storage #(
  parameter int unsigned O      = fir_pkg::O_DEF,
  parameter int unsigned NC     = fir_pkg::NC_DEF,
  parameter int unsigned ADDR_W = fir_pkg::ADDR_W_DEF,
  parameter logic [ADDR_W-1:0] COEFF_BASE = ADDR_W'(fir_pkg::COEFF_BASE_DEF)
) (
  input  logic                 clk,
  input  logic                 rst,
  input  logic [ADDR_W-1:0]    c_addr,
  input  logic                 c_wr,
  input  logic                 c_rd,
  input  logic [NC-1:0]        c_wdata,
  output logic [NC-1:0]        c_rdata,
  output logic                 c_ack,
  output logic [O-1:0][NC-1:0] coeffs
);
  localparam int unsigned IW = (O > 1) ? $clog2(O) : 1;

  logic [ADDR_W-1:0] offset;
  logic              hit;
  logic [IW-1:0]     idx;

  always_comb begin
    offset = c_addr - COEFF_BASE;
    hit    = (c_addr >= COEFF_BASE) && (32'(offset) < O);
    idx    = IW'(offset);
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      coeffs  <= '0;
      c_rdata <= '0;
      c_ack   <= 1'b0;
    end else begin
      if (c_wr && hit) coeffs[idx] <= c_wdata;
      c_ack <= (c_wr || c_rd) && hit;
      if (c_rd && hit) c_rdata <= coeffs[idx];
    end
  end

  // the coefficient window must lie inside the address space
  initial assert (64'(COEFF_BASE) + 64'(O) <= (64'(1) << ADDR_W))
    else $error("coeff_storage: window does not fit in the address space");
endmodule
