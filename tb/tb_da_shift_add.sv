// Self-checking testbench of da_shift_add.
// Checks y = sum k[b] * 2^b modulo 2^OUT_W for the default stage (four 8-bit
// plane words, 11-bit output), using random words, all-ones words (which
// wrap) and the published 8-tap example (k = 71, 71, 0, 0 gives 213); then
// checks a 12-bit output stage, wide enough to be exact.
module tb_da_shift_add;

  logic [7:0]  k [4];
  logic [10:0] y;
  logic [11:0] y12;

  int checks = 0, failures = 0;

  da_shift_add                                       dut   (.k(k), .y(y));
  da_shift_add #(.PLANES(4), .LUT_W(8), .OUT_W(12))  dut12 (.k(k), .y(y12));

  initial begin : watchdog
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(string what);
    int unsigned exp;
    exp = k[0] + 2 * k[1] + 4 * k[2] + 8 * k[3];
    #1;
    checks += 2;
    if (y !== 11'(exp)) begin
      failures++;
      $display("%s: y = %0d, expected %0d", what, y, exp % 2048);
    end
    if (y12 !== 12'(exp)) begin
      failures++;
      $display("%s: y12 = %0d, expected %0d", what, y12, exp);
    end
  endtask

  initial begin
    k = '{8'd71, 8'd71, 8'd0, 8'd0};
    check("example");
    checks++;
    if (y !== 11'd213) begin
      failures++;
      $display("example: y = %0d, expected 213", y);
    end
    k = '{8'hFF, 8'hFF, 8'hFF, 8'hFF};
    check("all ones");
    for (int b = 0; b < 4; b++) begin
      k = '{default: 8'd0};
      k[b] = 8'd1;
      check("single plane");
    end
    for (int n = 0; n < 1000; n++) begin
      for (int b = 0; b < 4; b++) k[b] = 8'($urandom);
      check("random");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
