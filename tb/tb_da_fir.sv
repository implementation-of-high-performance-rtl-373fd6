// Self-checking testbench of da_fir.
// Three filters run on the same input stream:
//   u8  - the default filter (8 taps, 4-bit samples, 8-bit coefficients,
//         8-bit table words, 11-bit output, pipelined), checked against the
//         plane-wise reference with the same wrap-around;
//   u5  - 5 taps with 5-bit coefficients and 8-bit output, its tables divided
//         into groups of 2 taps and no pipeline register, checked the same
//         way;
//   u8x - 8 taps, pipelined, with widths large enough to be exact, checked
//         against the plain multiply-and-add convolution.
// Every output is checked in every clock cycle, after the new sample is
// applied and before the clock edge that takes it. The pipelined filters must
// show the result of the previous window (a latency of exactly one clock, a
// new result every clock); the unpipelined one the present window. The
// published 8-tap example (input 3 held, coefficients 5 6 4 1 13 9 12 21)
// must give 213 once the delay line is full of 3s.
module tb_da_fir;
  import da_ref_pkg::*;

  logic        clk = 1'b0;
  logic        rst_n;
  logic [3:0]  din;
  logic [7:0]  h8 [8];
  logic [4:0]  h5 [5];
  logic [7:0]  h8_next [8];   // coefficients to apply with the next sample
  logic [4:0]  h5_next [5];
  logic [10:0] y8;
  logic [7:0]  y5;
  logic [14:0] y8x;

  int checks = 0, failures = 0;
  int wraps8 = 0;
  vec_t x;   // x[i] = sample i clocks old
  u64_t p8 = 0, p8x = 0;  // results of the previous window (pipeline stage)

  da_fir                                                        u8  (.clk, .rst_n, .din, .coef(h8), .dout(y8));
  da_fir #(.TAPS(5), .DATA_W(4), .COEF_W(5), .LUT_W(5),
           .OUT_W(8), .SUB_TAPS(2), .PIPELINE(1'b0))            u5  (.clk, .rst_n, .din, .coef(h5), .dout(y5));
  da_fir #(.TAPS(8), .DATA_W(4), .COEF_W(8), .LUT_W(11),
           .OUT_W(15))                                          u8x (.clk, .rst_n, .din, .coef(h8), .dout(y8x));

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic vec_t first(vec_t v, int n);
    vec_t r = {};
    for (int i = 0; i < n; i++) r.push_back(v[i]);
    return r;
  endfunction

  task automatic check_outputs(string what);
    vec_t c8 = {}, c5 = {};
    u64_t e8, e5, ex;
    foreach (h8[i]) c8.push_back(u64_t'(h8[i]));
    foreach (h5[i]) c5.push_back(u64_t'(h5[i]));
    e8 = da_out(c8, x, 4, 8, 11);
    e5 = da_out(c5, first(x, 5), 4, 5, 8);
    ex = exact_out(c8, x);
    if (e8 != (ex & 2047)) wraps8++;
    checks += 3;
    if (y8 !== 11'(p8)) begin
      failures++;
      $display("%s: 8-tap dout %0d, expected %0d", what, y8, p8);
    end
    if (y5 !== 8'(e5)) begin
      failures++;
      $display("%s: 5-tap dout %0d, expected %0d", what, y5, e5);
    end
    if (y8x !== 15'(p8x)) begin
      failures++;
      $display("%s: exact 8-tap dout %0d, expected %0d", what, y8x, p8x);
    end
    p8  = e8;
    p8x = ex;
  endtask

  // apply one sample with the current coefficients, check, then clock it in
  // coefficients change only between clock edges, together with the sample
  task automatic step(logic [3:0] sample, string what);
    @(negedge clk);
    h8 = h8_next;
    h5 = h5_next;
    din  = sample;
    x[0] = u64_t'(sample);
    #1 check_outputs(what);
    @(posedge clk);
    x.push_front(0);
    void'(x.pop_back());
  endtask

  initial begin
    rst_n = 1'b0;
    din   = '0;
    x     = {};
    for (int i = 0; i < 8; i++) x.push_back(0);
    h8 = '{8'd5, 8'd6, 8'd4, 8'd1, 8'd13, 8'd9, 8'd12, 8'd21};
    foreach (h5[i]) h5[i] = 5'(i + 1);
    h8_next = h8;
    h5_next = h5;
    #12;
    check_outputs("after reset");
    @(negedge clk) rst_n = 1'b1;

    // published 8-tap example: the input held at 3
    for (int n = 0; n < 8; n++) step(4'd3, "example");
    // one clock after the eighth 3 the pipelined output shows 213
    @(negedge clk);
    #1 checks++;
    if (y8 !== 11'd213) begin
      failures++;
      $display("example: dout1 %0d, expected 213", y8);
    end

    // impulse: one clock after it is applied, the pipelined output walks
    // through the coefficients, one per clock
    @(posedge clk);
    x[0] = 3;
    x.push_front(0);
    void'(x.pop_back());
    for (int n = 0; n < 9; n++) step(4'd0, "flush");
    step(4'd1, "impulse");
    for (int i = 0; i < 8; i++) begin
      @(negedge clk);
      din = 4'd0;
      #1 checks++;
      if (y8 !== 11'(h8[i])) begin
        failures++;
        $display("impulse: output %0d clocks after the impulse is %0d, expected %0d", i + 1, y8, h8[i]);
      end
      x[0] = 0;
      check_outputs("impulse");
      @(posedge clk);
      x.push_front(0);
      void'(x.pop_back());
    end
    for (int n = 0; n < 8; n++) step(4'd0, "flush");

    // random samples and coefficients, coefficients changing now and then
    for (int n = 0; n < 2000; n++) begin
      if (n % 50 == 0) begin
        foreach (h8_next[i]) h8_next[i] = (n % 100 == 0) ? 8'($urandom) : 8'($urandom_range(0, 31));
        foreach (h5_next[i]) h5_next[i] = 5'($urandom);
      end
      step(4'($urandom), "random");
    end

    checks++;
    if (wraps8 == 0) begin
      failures++;
      $display("the 8-tap filter never wrapped around");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
