// fir_pkg: sizes shared by the blocks of the 64-tap sequential FIR filter.
//
// The filter computes y[n] = sum_{k=0}^{O-1} b[k] * x[n-k] with O = 64 taps,
// 8-bit signed samples (NX) and coefficients (NC). One 8x8 product is
// NY = NX + NC = 16 bits wide; summing O of them needs LOG2O = 6 more bits of
// headroom, so the output word is NY + LOG2O = 22 bits and can never overflow.
// These numbers are the ones the filter was specified with. The coefficient
// bus is ADDR_W = 16 bits wide; the base address of the coefficient window is
// this design's own choice (see coeff_storage).
package fir_pkg;
  localparam int unsigned O_DEF      = 64;           // number of taps
  localparam int unsigned LOG2O_DEF  = 6;            // log2(O): accumulator guard bits
  localparam int unsigned NX_DEF     = 8;            // input sample width
  localparam int unsigned NC_DEF     = 8;            // coefficient width
  localparam int unsigned NY_DEF     = NX_DEF + NC_DEF;  // product width (16)
  localparam int unsigned ADDR_W_DEF = 16;           // coefficient bus address width
  localparam logic [ADDR_W_DEF-1:0] COEFF_BASE_DEF = 16'hFFC0;  // b[i] at COEFF_BASE + i
endpackage
