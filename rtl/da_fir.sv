// Parallel distributed-arithmetic (DA) FIR filter.
//
//     dout(n) = sum_{i=0}^{TAPS-1} coef[i] * x(n-i),   x(n) = din
//
// computed without multipliers. The delay line presents the TAPS samples
// x(n) .. x(n-TAPS+1). Instead of multiplying each sample by its coefficient,
// the samples are cut into DATA_W bit planes: plane b is the TAPS-bit word
// made of bit b of every sample (the published 8-tap filter calls these
// p1..p4). Each plane addresses its own DA table (da_lut), which returns the
// sum of the coefficients selected by the ones in the plane (k1..k4). The
// shift-and-add stage weights plane b by 2^b and adds the planes.
//
// All DATA_W bit planes are handled in the same clock cycle, by DATA_W copies
// of the table, so a new output is produced every clock: this is the
// bit-parallel form of DA, as in the published 5-tap and 8-tap filters, not
// the bit-serial form that takes DATA_W cycles per sample.
//
// Pipeline: with PIPELINE = 1 (the default) the DATA_W table words are held
// in a register between the tables and the shift-and-add stage, so no path
// runs from an input straight to dout and the clock period is set by the
// slower of "delay line -> table" and "register -> adders". The published
// 5-tap filter stores its four table words (4 x 5 bits) the same way and
// reports no input-to-output combinational path; it uses latches, this
// design uses edge-triggered flip-flops. PIPELINE = 0 removes the register.
//
// Interface: din and coef are sampled on every rising clock edge; coef[i]
// multiplies the sample i edges older than the newest one (coef[0] the
// newest). With PIPELINE = 1, dout after edge n is the output for the window
// x(n) .. x(n-TAPS+1), coefficients included, that was on the inputs just
// before edge n: a latency of one clock and one result per clock. With
// PIPELINE = 0, dout follows din and coef combinationally. rst_n clears the
// history and the table-word register (this design's own addition; the
// published filters have no reset input). Samples and coefficients are
// unsigned. With LUT_W and OUT_W at the widths of the published filters the
// results wrap modulo 2^LUT_W per plane and modulo 2^OUT_W overall; larger
// widths give the exact convolution. SUB_TAPS < TAPS splits each bit-plane
// table into smaller tables (see da_lut).
//
// The defaults are the published 8-tap filter.
module da_fir #(
  parameter int unsigned TAPS     = 8,
  parameter int unsigned DATA_W   = 4,
  parameter int unsigned COEF_W   = 8,
  parameter int unsigned LUT_W    = 8,
  parameter int unsigned OUT_W    = 11,
  parameter int unsigned SUB_TAPS = TAPS,
  parameter bit          PIPELINE = 1'b1
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic [DATA_W-1:0] din,
  input  logic [COEF_W-1:0] coef [TAPS],
  output logic [OUT_W-1:0]  dout
);

  logic [DATA_W-1:0] taps  [TAPS];    // x(n-i)
  logic [TAPS-1:0]   plane [DATA_W];  // plane[b][i] = bit b of x(n-i)
  logic [LUT_W-1:0]  k     [DATA_W];  // table output of plane b
  logic [LUT_W-1:0]  k_q   [DATA_W];  // the same, after the pipeline stage

  da_delay_line #(
    .TAPS   (TAPS),
    .DATA_W (DATA_W)
  ) u_delay (
    .clk   (clk),
    .rst_n (rst_n),
    .din   (din),
    .taps  (taps)
  );

  always_comb begin
    for (int b = 0; b < int'(DATA_W); b++)
      for (int i = 0; i < int'(TAPS); i++)
        plane[b][i] = taps[i][b];
  end

  for (genvar b = 0; b < int'(DATA_W); b++) begin : g_plane
    da_lut #(
      .TAPS     (TAPS),
      .COEF_W   (COEF_W),
      .LUT_W    (LUT_W),
      .SUB_TAPS (SUB_TAPS)
    ) u_lut (
      .coef (coef),
      .addr (plane[b]),
      .data (k[b])
    );
  end

  if (PIPELINE) begin : g_pipe
    always_ff @(posedge clk or negedge rst_n) begin
      if (!rst_n) begin
        for (int b = 0; b < int'(DATA_W); b++) k_q[b] <= '0;
      end else begin
        k_q <= k;
      end
    end
  end else begin : g_nopipe
    always_comb k_q = k;
  end

  da_shift_add #(
    .PLANES (DATA_W),
    .LUT_W  (LUT_W),
    .OUT_W  (OUT_W)
  ) u_sum (
    .k (k_q),
    .y (dout)
  );

endmodule
