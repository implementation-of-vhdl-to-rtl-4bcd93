// fir_mult: the single time-multiplexed multiplier of the FIR datapath.
//
// Multiplies an NX-bit signed sample by an NC-bit signed coefficient and
// returns the full NX+NC-bit signed product (8 x 8 -> 16 bits), so no
// rounding or truncation happens here. Signed arithmetic is this design's
// choice. Purely combinational; the filter uses it once per clock, on one tap.
module fir_mult #(
  parameter int unsigned NX = fir_pkg::NX_DEF,
  parameter int unsigned NC = fir_pkg::NC_DEF
) (
  input  logic signed [NX-1:0]    a,
  input  logic signed [NC-1:0]    b,
  output logic signed [NX+NC-1:0] p
);
  always_comb p = (NX+NC)'(a) * (NX+NC)'(b);
endmodule
