// tb_clock_gate: counts gated clock edges for known enable patterns, checks
// that an enable change while the clock is high does not cut the current
// pulse, and that test_en forces the clock on.
module tb_clock_gate;
  logic clk = 1'b0;
  always #5 clk = ~clk;
  logic en = 1'b0, test_en = 1'b0, gclk;
  int gedges = 0;
  int checks = 0, failures = 0;

  clock_gate dut (.clk, .en, .test_en, .gclk);

  always @(posedge gclk) gedges++;

  task automatic expect_edges(input int n, input int exp_n, input string what);
    int n0;
    n0 = gedges;
    repeat (n) @(posedge clk);
    #1;
    checks++;
    if (gedges - n0 != exp_n) begin
      failures++;
      $display("FAIL %s: %0d gated edges, expected %0d", what, gedges - n0, exp_n);
    end
  endtask

  initial begin : watchdog
    repeat (1000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    @(negedge clk);
    en = 1'b0;
    expect_edges(10, 0, "disabled");
    @(negedge clk); en = 1'b1;
    expect_edges(10, 10, "enabled");
    // alternate enable every cycle: half the edges pass
    for (int i = 0; i < 10; i++) begin
      @(negedge clk); en = (i % 2 == 0);
      expect_edges(1, (i % 2 == 0) ? 1 : 0, "alternating");
    end
    // enable dropped while clk is high must not shorten the pulse
    @(negedge clk); en = 1'b1;
    @(posedge clk); #1 en = 1'b0;
    #1;
    checks++;
    if (gclk !== 1'b1) begin failures++; $display("FAIL glitch: gclk cut while clk high"); end
    @(negedge clk); #1;
    checks++;
    if (gclk !== 1'b0) begin failures++; $display("FAIL gclk high with clk low"); end
    expect_edges(5, 0, "disabled after drop");
    @(negedge clk); test_en = 1'b1;
    expect_edges(6, 6, "test_en");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
