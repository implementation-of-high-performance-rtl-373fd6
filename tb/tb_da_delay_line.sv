// Self-checking testbench of da_delay_line (8 taps of 4 bits).
// Drives random samples, keeps its own history of what was driven and checks
// every tap in the middle of each clock cycle; also checks that the reset
// clears the history, that tap 0 follows the input without a clock, and that
// a sample reaches tap i exactly i clocks after it was driven.
module tb_da_delay_line;

  localparam int unsigned TAPS   = 8;
  localparam int unsigned DATA_W = 4;

  logic              clk = 1'b0;
  logic              rst_n;
  logic [DATA_W-1:0] din;
  logic [DATA_W-1:0] taps [TAPS];

  int checks = 0, failures = 0;
  int unsigned hist [TAPS];   // hist[i] = x(n-i)

  da_delay_line #(.TAPS(TAPS), .DATA_W(DATA_W)) dut (.*);

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (2000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check_all(string what);
    for (int i = 0; i < int'(TAPS); i++) begin
      checks++;
      if (taps[i] !== DATA_W'(hist[i])) begin
        failures++;
        $display("%s: tap %0d = %0d, expected %0d", what, i, taps[i], hist[i]);
      end
    end
  endtask

  initial begin
    rst_n = 1'b0;
    din   = '0;
    for (int i = 0; i < int'(TAPS); i++) hist[i] = 0;
    #12;
    check_all("reset");
    @(negedge clk) rst_n = 1'b1;

    // random stream
    for (int n = 0; n < 300; n++) begin
      @(negedge clk);
      din     = DATA_W'($urandom);
      hist[0] = din;
      #1 check_all("stream");
      @(posedge clk);
      for (int i = int'(TAPS) - 1; i > 0; i--) hist[i] = hist[i-1];
    end

    // a single marked sample walks down the taps one position per clock
    @(negedge clk) din = 4'hF;
    @(posedge clk);
    @(negedge clk) din = 4'h0;
    for (int i = 1; i < int'(TAPS); i++) begin
      #1;
      checks++;
      if (taps[i] !== 4'hF) begin
        failures++;
        $display("marker not at tap %0d after %0d clocks", i, i);
      end
      @(negedge clk);
    end

    // asynchronous reset clears the history without a clock edge
    #2 rst_n = 1'b0;
    #1;
    for (int i = 1; i < int'(TAPS); i++) begin
      checks++;
      if (taps[i] !== '0) begin
        failures++;
        $display("tap %0d not cleared by reset", i);
      end
    end

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
