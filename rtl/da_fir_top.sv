// Two distributed-arithmetic FIR filters side by side.
//
// fir5: 5 taps, 4-bit samples (dain), 5-bit coefficients g[0..4] (g00..g44
//       of the published filter), 8-bit output dout.
// fir8: 8 taps, 4-bit samples (dain1), 8-bit coefficients h[0..7], 11-bit
//       output dout1.
//
// The two filters share only the clock and the reset. Each takes one sample
// per clock and, through its pipeline register on the bit-plane table words,
// presents the result for the window ending with a sample one clock edge
// after that sample was applied (see da_fir). Coefficient i multiplies the
// sample i clocks older than the newest. The port names and widths follow the
// published filters; the reset input is this design's own addition.
module da_fir_top
  import da_fir_pkg::*;
(
  input  logic                     clk,
  input  logic                     rst_n,
  // 5-tap filter
  input  logic [FIR5_DATA_W-1:0]   dain,
  input  logic [FIR5_COEF_W-1:0]   g     [FIR5_TAPS],
  output logic [FIR5_OUT_W-1:0]    dout,
  // 8-tap filter
  input  logic [FIR8_DATA_W-1:0]   dain1,
  input  logic [FIR8_COEF_W-1:0]   h     [FIR8_TAPS],
  output logic [FIR8_OUT_W-1:0]    dout1
);

  da_fir #(
    .TAPS   (FIR5_TAPS),
    .DATA_W (FIR5_DATA_W),
    .COEF_W (FIR5_COEF_W),
    .LUT_W  (FIR5_LUT_W),
    .OUT_W  (FIR5_OUT_W)
  ) u_fir5 (
    .clk   (clk),
    .rst_n (rst_n),
    .din   (dain),
    .coef  (g),
    .dout  (dout)
  );

  da_fir #(
    .TAPS   (FIR8_TAPS),
    .DATA_W (FIR8_DATA_W),
    .COEF_W (FIR8_COEF_W),
    .LUT_W  (FIR8_LUT_W),
    .OUT_W  (FIR8_OUT_W)
  ) u_fir8 (
    .clk   (clk),
    .rst_n (rst_n),
    .din   (dain1),
    .coef  (h),
    .dout  (dout1)
  );

endmodule
