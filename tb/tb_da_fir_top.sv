// End-to-end testbench of da_fir_top at its default (published) sizes.
//
// Both filters are driven in parallel, each with its own stream, and every
// output is checked in every clock cycle against the plane-wise reference of
// da_ref_pkg (which multiplies, and reproduces the wrap-around of the
// published word widths). The run contains:
//   * the published 5-tap stimulus: in cycle t the input is t and the
//     coefficients g00..g44 are t, t+2, t+1, t+3, t+1;
//   * the published 8-tap example: input 3 held, coefficients
//     5 6 4 1 13 9 12 21, which gives 213 (all table words 71, 71, 0, 0);
//   * random samples and coefficients.
// It counts how often each mechanism of the design was exercised and fails
// if one never was: the reset clearing the delay line, a sample reaching the
// last tap, every bit plane addressing a non-zero table word, a table sum
// wrapping at the coefficient width, and the output wrapping at its width.
module tb_da_fir_top;
  import da_ref_pkg::*;
  import da_fir_pkg::*;

  logic                   clk = 1'b0;
  logic                   rst_n;
  logic [FIR5_DATA_W-1:0] dain;
  logic [FIR5_COEF_W-1:0] g [FIR5_TAPS];
  logic [FIR5_OUT_W-1:0]  dout;
  logic [FIR8_DATA_W-1:0] dain1;
  logic [FIR8_COEF_W-1:0] h [FIR8_TAPS];
  logic [FIR8_OUT_W-1:0]  dout1;
  logic [FIR5_COEF_W-1:0] g_next [FIR5_TAPS];   // applied with the next sample
  logic [FIR8_COEF_W-1:0] h_next [FIR8_TAPS];

  int checks = 0, failures = 0;
  vec_t x5, x8;   // sample histories, [i] = i clocks old

  // mechanism counters
  int n_reset = 0, n_last_tap = 0, n_lut_wrap = 0, n_out_wrap = 0;
  int n_plane [FIR8_DATA_W];
  int n_latency = 0;     // cycles where the output showed the previous window
  int expect_dout1 = -1; // a fixed value dout1 must show in the next step
  u64_t p5 = 0, p8 = 0;  // results of the previous windows (pipeline stage)

  da_fir_top dut (.*);

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic count_mechanisms(vec_t c, vec_t x, int unsigned lut_w, int unsigned out_w);
    u64_t wide = 0;
    for (int unsigned b = 0; b < 4; b++) begin
      u64_t raw = plane_sum_raw(c, x, b);
      if (plane_sum(c, x, b, lut_w) != 0) n_plane[b]++;
      if (raw >= (u64_t'(1) << lut_w)) n_lut_wrap++;
      wide += plane_sum(c, x, b, lut_w) << b;
    end
    if (wide >= (u64_t'(1) << out_w)) n_out_wrap++;
    if (x[x.size() - 1] != 0) n_last_tap++;
  endtask

  task automatic check_outputs(string what);
    vec_t c5 = {}, c8 = {};
    u64_t e5, e8;
    foreach (g[i]) c5.push_back(u64_t'(g[i]));
    foreach (h[i]) c8.push_back(u64_t'(h[i]));
    e5 = da_out(c5, x5, FIR5_DATA_W, FIR5_LUT_W, FIR5_OUT_W);
    e8 = da_out(c8, x8, FIR8_DATA_W, FIR8_LUT_W, FIR8_OUT_W);
    count_mechanisms(c5, x5, FIR5_LUT_W, FIR5_OUT_W);
    count_mechanisms(c8, x8, FIR8_LUT_W, FIR8_OUT_W);
    checks += 2;
    if (dout !== FIR5_OUT_W'(p5)) begin
      failures++;
      $display("%s: dout %0d, expected %0d at %0t", what, dout, p5, $time);
    end else if (p5 != e5) begin
      n_latency++;
    end
    if (dout1 !== FIR8_OUT_W'(p8)) begin
      failures++;
      $display("%s: dout1 %0d, expected %0d at %0t", what, dout1, p8, $time);
    end
    if (expect_dout1 >= 0) begin
      checks++;
      if (dout1 !== FIR8_OUT_W'(expect_dout1)) begin
        failures++;
        $display("%s: dout1 %0d, expected %0d", what, dout1, expect_dout1);
      end
    end
    p5 = e5;
    p8 = e8;
  endtask

  // coefficients change only between clock edges, together with the samples
  task automatic step(logic [3:0] s5, logic [3:0] s8, string what);
    @(negedge clk);
    g = g_next;
    h = h_next;
    dain  = s5;
    dain1 = s8;
    x5[0] = u64_t'(s5);
    x8[0] = u64_t'(s8);
    #1 check_outputs(what);
    @(posedge clk);
    x5.push_front(0);
    void'(x5.pop_back());
    x8.push_front(0);
    void'(x8.pop_back());
  endtask

  task automatic apply_reset();
    @(negedge clk) rst_n = 1'b0;
    foreach (x5[i]) x5[i] = 0;
    foreach (x8[i]) x8[i] = 0;
    p5 = 0;
    p8 = 0;
    dain  = '0;
    dain1 = '0;
    #1 check_outputs("reset");
    // with a zero input and a cleared history both outputs must be zero
    checks++;
    if (dout !== '0 || dout1 !== '0) begin
      failures++;
      $display("reset: outputs %0d %0d, expected 0 0", dout, dout1);
    end else begin
      n_reset++;
    end
    @(negedge clk) rst_n = 1'b1;
  endtask

  initial begin
    rst_n = 1'b0;
    x5 = {};
    x8 = {};
    for (int i = 0; i < int'(FIR5_TAPS); i++) x5.push_back(0);
    for (int i = 0; i < int'(FIR8_TAPS); i++) x8.push_back(0);
    foreach (n_plane[b]) n_plane[b] = 0;
    foreach (g[i]) g[i] = '0;
    foreach (h[i]) h[i] = '0;
    g_next = g;
    h_next = h;
    dain  = '0;
    dain1 = '0;
    apply_reset();

    // published stimuli, both filters at once
    h_next = '{8'd5, 8'd6, 8'd4, 8'd1, 8'd13, 8'd9, 8'd12, 8'd21};
    for (int t = 0; t < 8; t++) begin
      g_next = '{5'(t), 5'(t + 2), 5'(t + 1), 5'(t + 3), 5'(t + 1)};
      step(4'(t), 4'd3, "published stimulus");
    end
    // the window before this step was eight 3s: dout1 must now show 213
    expect_dout1 = 213;
    step(4'd7, 4'd3, "published stimulus");
    expect_dout1 = -1;

    // random operation, with a reset in the middle
    for (int n = 0; n < 4000; n++) begin
      if (n % 40 == 0) begin
        foreach (g_next[i]) g_next[i] = 5'($urandom);
        foreach (h_next[i]) h_next[i] = (n % 80 == 0) ? 8'($urandom) : 8'($urandom_range(0, 15));
      end
      if (n == 2000) apply_reset();
      step(4'($urandom), 4'($urandom), "random");
    end

    $display("mechanisms: reset %0d, last tap reached %0d, table wrap %0d, output wrap %0d, pipeline delay seen %0d",
             n_reset, n_last_tap, n_lut_wrap, n_out_wrap, n_latency);
    $display("bit planes active: %0d %0d %0d %0d", n_plane[0], n_plane[1], n_plane[2], n_plane[3]);
    checks += 9;
    if (n_latency == 0) begin failures++; $display("pipeline delay never observable"); end
    if (n_reset < 2)    begin failures++; $display("reset never exercised"); end
    if (n_last_tap == 0) begin failures++; $display("no sample reached the last tap"); end
    if (n_lut_wrap == 0) begin failures++; $display("no table sum wrapped"); end
    if (n_out_wrap == 0) begin failures++; $display("no output wrapped"); end
    foreach (n_plane[b])
      if (n_plane[b] == 0) begin failures++; $display("bit plane %0d never active", b); end

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
