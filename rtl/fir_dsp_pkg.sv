// fir_dsp_pkg: types, constants and arithmetic shared by the FIR designs.
//
// Samples, coefficients, products and sums are all 32-bit two's complement
// fixed point with 1 integer bit and 31 fraction bits (Q1.31). A product of
// two Q1.31 values is formed at full 64-bit width and brought back to Q1.31
// by dropping the 31 low fraction bits (rounding toward minus infinity) and
// keeping the 32 bits above them, which wraps on overflow. Sums wrap as
// well. The number format is the one the design is specified with; the
// choice of truncation and wrap-around (instead of rounding or saturation)
// is this implementation's own and matches plain two's complement hardware.
//
// The package also holds the target encoding of the DSP's memory
// programming port.
package fir_dsp_pkg;

  localparam int unsigned DATA_W = 32;  // sample and coefficient width
  localparam int unsigned FRAC_W = 31;  // fraction bits of Q1.31

  typedef logic signed [DATA_W-1:0] sample_t;

  // Which memory of the DSP the programming port writes.
  typedef enum logic [1:0] {
    PT_PMEM = 2'd0,  // program memory, data = instruction word
    PT_XMEM = 2'd1,  // one of the sample memories
    PT_YMEM = 2'd2   // one of the coefficient memories
  } prog_target_e;

  // Q1.31 x Q1.31 -> Q1.31, truncating and wrapping.
  function automatic sample_t fx_mul(sample_t a, sample_t b);
    logic signed [2*DATA_W-1:0] p;
    p = 64'(a) * 64'(b);
    return p[FRAC_W +: DATA_W];
  endfunction

endpackage
