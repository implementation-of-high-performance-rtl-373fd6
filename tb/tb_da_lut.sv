// Self-checking testbench of da_lut.
// Three tables are checked against sums formed by multiplication:
//   * the default table (8 taps, 8-bit coefficients, 8-bit words, undivided),
//     whose sums wrap modulo 256 as in the published 8-tap filter;
//   * the same taps divided into groups of 3 taps (tables of 8 words each);
//   * a 5-tap table with 12-bit words, wide enough to be exact.
// Every address of the 8-tap tables is visited for several coefficient sets.
module tb_da_lut;
  import da_ref_pkg::*;

  localparam int unsigned TAPS = 8, COEF_W = 8;

  logic [COEF_W-1:0] coef [TAPS];
  logic [TAPS-1:0]   addr;
  logic [7:0]        d_full, d_div;
  logic [4:0]        addr5;
  logic [7:0]        coef5 [5];
  logic [11:0]       d_exact;

  int checks = 0, failures = 0;
  int wraps = 0;

  da_lut #(.TAPS(TAPS), .COEF_W(COEF_W), .LUT_W(8))                u_full  (.coef(coef), .addr(addr), .data(d_full));
  da_lut #(.TAPS(TAPS), .COEF_W(COEF_W), .LUT_W(8), .SUB_TAPS(3))  u_div   (.coef(coef), .addr(addr), .data(d_div));
  da_lut #(.TAPS(5),    .COEF_W(8),      .LUT_W(12))               u_exact (.coef(coef5), .addr(addr5), .data(d_exact));

  initial begin : watchdog
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    vec_t c, x;
    u64_t raw;
    for (int set = 0; set < 6; set++) begin
      c = {};
      for (int i = 0; i < int'(TAPS); i++) begin
        // set 0 is the coefficient set of the published 8-tap example
        case (set)
          0: coef[i] = 8'(i == 0 ? 5 : i == 1 ? 6 : i == 2 ? 4 : i == 3 ? 1 :
                          i == 4 ? 13 : i == 5 ? 9 : i == 6 ? 12 : 21);
          1: coef[i] = 8'hFF;
          default: coef[i] = 8'($urandom);
        endcase
        c.push_back(coef[i]);
      end
      for (int a = 0; a < (1 << TAPS); a++) begin
        addr = TAPS'(a);
        x = {};
        for (int i = 0; i < int'(TAPS); i++) x.push_back((a >> i) & 1);
        #1;
        raw = plane_sum_raw(c, x, 0);
        if (raw > 255) wraps++;
        checks += 2;
        if (d_full !== 8'(raw)) begin
          failures++;
          $display("full: set %0d addr %02h: %0d, expected %0d", set, a, d_full, raw & 255);
        end
        if (d_div !== 8'(raw)) begin
          failures++;
          $display("divided: set %0d addr %02h: %0d, expected %0d", set, a, d_div, raw & 255);
        end
      end
      if (set == 0) begin
        // all eight address bits set: the sum of all coefficients, 71
        addr = '1;
        #1 checks++;
        if (d_full !== 8'd71) begin
          failures++;
          $display("all-ones address gives %0d, expected 71", d_full);
        end
      end
    end

    for (int n = 0; n < 200; n++) begin
      c = {};
      x = {};
      addr5 = 5'($urandom);
      for (int i = 0; i < 5; i++) begin
        coef5[i] = 8'($urandom);
        c.push_back(coef5[i]);
        x.push_back((addr5 >> i) & 1);
      end
      #1 checks++;
      if (d_exact !== 12'(plane_sum_raw(c, x, 0))) begin
        failures++;
        $display("exact: addr %02h: %0d, expected %0d", addr5, d_exact, plane_sum_raw(c, x, 0));
      end
    end

    checks++;
    if (wraps == 0) begin
      failures++;
      $display("no table sum exceeded the word width");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
