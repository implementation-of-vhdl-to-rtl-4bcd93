// fir_dff: W-bit D flip-flop register with load enable and synchronous clear.
//
// On a rising clock edge: clr loads zero (and wins over en), otherwise en
// loads d, otherwise q holds. The filter builds its input/delay-line
// registers, its accumulator and its output register from it. The clear is
// synchronous because the filter's clear signal acts "by rising edge of
// clock"; the enable is this design's own addition.
module fir_dff #(
  parameter int unsigned W = fir_pkg::NX_DEF
) (
  input  logic         clk,
  input  logic         clr,
  input  logic         en,
  input  logic [W-1:0] d,
  output logic [W-1:0] q
);
  always_ff @(posedge clk) begin
    if (clr)     q <= '0;
    else if (en) q <= d;
  end
endmodule
