// Tap delay line of a DA FIR filter.
//
// Keeps the last TAPS-1 input samples in a chain of DATA_W-bit registers and
// presents all TAPS samples of the filter window in parallel: taps[0] is the
// current input x(n) itself (no register), taps[i] is x(n-i), the sample that
// was on din i clock edges ago. A filter of TAPS taps therefore needs only
// TAPS-1 registers, as in the published 5-tap (four 4-bit registers) and
// 8-tap (w1..w7) filters. Since taps[0] is a plain wire from din, a
// synthesis report lists those output bits as driven straight by an input.
//
// Timing: one new sample per clock; every register shifts on the rising edge.
// The asynchronous active-low reset clears the stored samples to zero, so the
// filter starts from an all-zero history; the reset is this design's own
// addition (the published filters have a clock input only).
module da_delay_line #(
  parameter int unsigned TAPS   = 8,
  parameter int unsigned DATA_W = 4
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic [DATA_W-1:0] din,
  output logic [DATA_W-1:0] taps [TAPS]
);

  // w[i] holds x(n-1-i)
  logic [DATA_W-1:0] w [TAPS-1];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < int'(TAPS) - 1; i++) w[i] <= '0;
    end else begin
      w[0] <= din;
      for (int i = 1; i < int'(TAPS) - 1; i++) w[i] <= w[i-1];
    end
  end

  always_comb begin
    taps[0] = din;
    for (int i = 1; i < int'(TAPS); i++) taps[i] = w[i-1];
  end

  initial begin
    assert (TAPS >= 2) else $error("da_delay_line: TAPS must be at least 2");
  end

endmodule
