// tb_clock_gate: self-checking test of the clock-gating cell.
//
// Drives a free-running clock and a random enable that changes in the low
// phase, and checks that gclk_o copies the clock when the enable is high and
// stays low otherwise. It also changes the enable while the clock is high and
// checks that the gated clock neither rises nor is cut short (the latch must
// hold the enable through the high phase). The number of gated-clock edges is
// compared with the number of enabled cycles.
module tb_clock_gate;
  logic clk = 1'b0, en = 1'b0, gclk;
  int   checks = 0, failures = 0;
  int   gedges = 0, expected_edges = 0;

  clock_gate dut (.clk_i(clk), .en_i(en), .gclk_o(gclk));

  always #5 clk = ~clk;
  always @(posedge gclk) gedges++;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s at %0t", what, $time);
    end
  endtask

  initial begin
    #20000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    bit e;
    @(negedge clk);
    for (int i = 0; i < 400; i++) begin
      e  = 1'($urandom_range(0, 1));
      en = e;                          // low phase: enable may change
      @(posedge clk);
      if (e) expected_edges++;
      #1 check(gclk == e, "gclk follows clk & en");
      #1 en = ~e;                      // high phase: change must not pass
      #1 check(gclk == e, "enable held during high phase");
      @(negedge clk);
      #1 check(gclk == 1'b0, "gclk low in low phase");
    end
    en = 1'b0;
    #1;
    check(gedges == expected_edges, "gated edge count");
    $display("gated-clock edges %0d of 400 cycles", gedges);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
