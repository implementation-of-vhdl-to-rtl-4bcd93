// fir_adder: the single adder of the sequential FIR datapath.
//
// Adds two W-bit two's-complement words, s = a + b modulo 2^W. In the filter
// it adds the current product (sign-extended) to the running sum, so W is the
// output word width, 22 bits. The filter's guard bits guarantee that no
// 64-term sum overflows, so no saturation or carry-out is provided.
// Purely combinational.
module fir_adder #(
  parameter int unsigned W = fir_pkg::NY_DEF + fir_pkg::LOG2O_DEF
) (
  input  logic signed [W-1:0] a,
  input  logic signed [W-1:0] b,
  output logic signed [W-1:0] s
);
  always_comb s = a + b;
endmodule
