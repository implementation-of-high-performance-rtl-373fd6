// Shared constants of the distributed-arithmetic (DA) FIR filters.
//
// Two filter configurations are built from the same da_fir module:
//   * a 5-tap filter with 4-bit samples and 5-bit coefficients, 8-bit output;
//   * an 8-tap filter with 4-bit samples and 8-bit coefficients, 11-bit output.
// The tap counts and all port widths are the ones of the published 5-tap and
// 8-tap filters. In both, each bit-plane table word is as wide as one
// coefficient, so the table sums and the output wrap modulo 2^width when the
// coefficients are large (see da_lut and da_shift_add). Widening LUT_W and
// OUT_W gives an exact filter; that is a choice left to the user.
package da_fir_pkg;

  // 5-tap filter
  localparam int unsigned FIR5_TAPS   = 5;
  localparam int unsigned FIR5_DATA_W = 4;
  localparam int unsigned FIR5_COEF_W = 5;
  localparam int unsigned FIR5_LUT_W  = 5;
  localparam int unsigned FIR5_OUT_W  = 8;

  // 8-tap filter
  localparam int unsigned FIR8_TAPS   = 8;
  localparam int unsigned FIR8_DATA_W = 4;
  localparam int unsigned FIR8_COEF_W = 8;
  localparam int unsigned FIR8_LUT_W  = 8;
  localparam int unsigned FIR8_OUT_W  = 11;

endpackage
