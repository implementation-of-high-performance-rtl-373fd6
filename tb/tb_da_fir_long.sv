// Self-checking testbench of da_fir at 16, 32 and 64 taps.
//
// Longer filters need divided tables: an undivided table per bit plane would
// hold 2^TAPS words. Here every filter uses groups of SUB_TAPS = 4 taps
// (tables of 16 words, whose outputs are added), 8-bit samples and 8-bit
// coefficients, and table and output widths large enough to be exact, so
// the outputs are checked against the plain multiply-and-add convolution.
// All three filters are pipelined: the output in a cycle is the result of
// the window at the previous clock edge.
module tb_da_fir_long;
  import da_ref_pkg::*;

  localparam int unsigned DW = 8, CW = 8, SUB = 4;

  logic          clk = 1'b0;
  logic          rst_n;
  logic [DW-1:0] din;
  logic [CW-1:0] c16 [16], c32 [32], c64 [64];
  logic [CW+4+DW-1:0] y16;   // LUT_W = CW + clog2(TAPS), OUT_W = LUT_W + DW
  logic [CW+5+DW-1:0] y32;
  logic [CW+6+DW-1:0] y64;

  int checks = 0, failures = 0;
  vec_t x;                    // 64 samples of history, [i] = i clocks old
  u64_t p16 = 0, p32 = 0, p64 = 0;

  da_fir #(.TAPS(16), .DATA_W(DW), .COEF_W(CW), .LUT_W(CW + 4), .OUT_W(CW + 4 + DW), .SUB_TAPS(SUB))
    u16 (.clk, .rst_n, .din, .coef(c16), .dout(y16));
  da_fir #(.TAPS(32), .DATA_W(DW), .COEF_W(CW), .LUT_W(CW + 5), .OUT_W(CW + 5 + DW), .SUB_TAPS(SUB))
    u32 (.clk, .rst_n, .din, .coef(c32), .dout(y32));
  da_fir #(.TAPS(64), .DATA_W(DW), .COEF_W(CW), .LUT_W(CW + 6), .OUT_W(CW + 6 + DW), .SUB_TAPS(SUB))
    u64 (.clk, .rst_n, .din, .coef(c64), .dout(y64));

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic u64_t conv(int taps);
    u64_t s = 0;
    for (int i = 0; i < taps; i++) begin
      u64_t c = (taps == 16) ? u64_t'(c16[i]) : (taps == 32) ? u64_t'(c32[i]) : u64_t'(c64[i]);
      s += c * x[i];
    end
    return s;
  endfunction

  task automatic check(string what);
    checks += 3;
    if (y16 !== $bits(y16)'(p16)) begin failures++; $display("%s: 16-tap %0d, expected %0d", what, y16, p16); end
    if (y32 !== $bits(y32)'(p32)) begin failures++; $display("%s: 32-tap %0d, expected %0d", what, y32, p32); end
    if (y64 !== $bits(y64)'(p64)) begin failures++; $display("%s: 64-tap %0d, expected %0d", what, y64, p64); end
    p16 = conv(16);
    p32 = conv(32);
    p64 = conv(64);
  endtask

  task automatic step(logic [DW-1:0] s, string what);
    @(negedge clk);
    din  = s;
    x[0] = u64_t'(s);
    #1 check(what);
    @(posedge clk);
    x.push_front(0);
    void'(x.pop_back());
  endtask

  initial begin
    rst_n = 1'b0;
    din   = '0;
    x     = {};
    for (int i = 0; i < 64; i++) x.push_back(0);
    foreach (c16[i]) c16[i] = CW'($urandom);
    foreach (c32[i]) c32[i] = CW'($urandom);
    foreach (c64[i]) c64[i] = CW'($urandom);
    #12;
    @(negedge clk) rst_n = 1'b1;
    // all-ones input and all-ones coefficients: the largest sums
    for (int n = 0; n < 70; n++) begin
      if (n == 0) begin
        @(negedge clk);
        foreach (c16[i]) c16[i] = '1;
        foreach (c32[i]) c32[i] = '1;
        foreach (c64[i]) c64[i] = '1;
        @(posedge clk);
      end
      step('1, "maximum");
    end
    checks++;
    if (y64 !== $bits(y64)'(64 * 255 * 255)) begin
      failures++;
      $display("64-tap maximum: %0d, expected %0d", y64, 64 * 255 * 255);
    end
    @(negedge clk);
    foreach (c16[i]) c16[i] = CW'($urandom);
    foreach (c32[i]) c32[i] = CW'($urandom);
    foreach (c64[i]) c64[i] = CW'($urandom);
    din  = '1;
    x[0] = 255;
    p16 = conv(16);
    p32 = conv(32);
    p64 = conv(64);
    @(posedge clk);
    x.push_front(0);
    void'(x.pop_back());
    for (int n = 0; n < 1000; n++) step(DW'($urandom), "random");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
