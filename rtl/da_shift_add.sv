// Shift-and-add stage of a parallel DA FIR filter.
//
// Bit plane b of the input samples produced the table word k[b]; its weight
// in the result is 2^b. This stage forms
//     y = sum over b of k[b] * 2^b                         (modulo 2^OUT_W)
// by wiring shifts and a chain of adders, with no multiplier. For four bit
// planes that is y = k1 + 2 k2 + 4 k3 + 8 k4 in the numbering of the
// published 8-tap filter. The samples are unsigned, so every plane adds.
//
// OUT_W is the output width. The published filters use LUT_W + 3 bits
// (8 and 11), one less than the LUT_W + PLANES bits an exact sum of four
// planes can need; the sum wraps modulo 2^OUT_W, and that is kept.
//
// Timing: purely combinational.
module da_shift_add #(
  parameter int unsigned PLANES = 4,
  parameter int unsigned LUT_W  = 8,
  parameter int unsigned OUT_W  = 11
) (
  input  logic [LUT_W-1:0] k [PLANES],
  output logic [OUT_W-1:0] y
);

  always_comb begin
    y = '0;
    for (int b = 0; b < int'(PLANES); b++)
      y = y + (OUT_W'(k[b]) << b);
  end

endmodule
