// fir_mux: N-to-1 word multiplexer.
//
// Picks word d[sel] out of N words of W bits. The filter uses two of them,
// one over the delay line and one over the coefficient array, to feed the
// tap selected this clock to the shared multiplier. A select value of N or
// more (possible only when N is not a power of two) gives zero.
// Purely combinational.
module fir_mux #(
  parameter int unsigned N  = fir_pkg::O_DEF,
  parameter int unsigned W  = fir_pkg::NX_DEF,
  parameter int unsigned SW = (N > 1) ? $clog2(N) : 1
) (
  input  logic [N-1:0][W-1:0] d,
  input  logic [SW-1:0]       sel,
  output logic [W-1:0]        q
);
  always_comb begin
    q = '0;
    if (32'(sel) < N) q = d[sel];
  end
endmodule
