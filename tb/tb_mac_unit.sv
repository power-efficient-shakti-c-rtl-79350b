// tb_mac_unit: end-to-end test of the clock-gated MAC unit at its default
// size (64-bit operands, 128-bit accumulator).
//
// Runs a sequence of multiply-accumulate operations against a model built on
// a shift-and-add reference multiplier:
//   * FIR-filter style dot products (a clear on the first tap, then
//     accumulation), with random idle gaps in which the operand buses keep
//     toggling;
//   * products of negative operands and an accumulation that wraps past the
//     top of the 128-bit accumulator.
// Every cycle it checks the one-cycle latency (valid_o and acc_o update on the
// edge after en_i), that acc_o holds while idle, that the multiplier sees
// zero operands while idle (operand isolation) and that the accumulator
// register's clock has no edge while idle (clock gating). Each of these
// mechanisms is counted, and one that never happened counts as a failure.
module tb_mac_unit;
  import tb_mac_ref_pkg::*;
  localparam int XLEN  = 64;
  localparam int ACC_W = 128;

  logic clk = 1'b0, rst_n = 1'b1, en = 1'b0, clr = 1'b0;
  logic [XLEN-1:0]  a = '0, b = '0;
  logic [ACC_W-1:0] acc, model;
  logic             valid;
  int checks = 0, failures = 0;
  int n_mac = 0, n_clear = 0, n_idle = 0, n_gated = 0, n_isolated = 0;
  int n_negative = 0, n_wrap = 0, gclk_edges = 0;

  mac_unit dut (
    .clk_i(clk), .rst_ni(rst_n), .en_i(en), .clr_i(clr),
    .a_i(a), .b_i(b), .acc_o(acc), .valid_o(valid));

  always #5 clk = ~clk;
  always @(posedge dut.gclk) gclk_edges++;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL %s at %0t acc=%h model=%h", what, $time, acc, model);
    end
  endtask

  // One clock cycle: apply inputs in the low phase, then check after the edge.
  task automatic cycle(input bit e, input bit c, input logic [XLEN-1:0] x,
                       input logic [XLEN-1:0] y);
    logic [127:0] p;
    logic [ACC_W-1:0] acc_prev;
    int edges0;
    @(negedge clk);
    en = e; clr = c; a = x; b = y;
    acc_prev = model;
    #1;
    if (!e) begin
      check(dut.a_iso == '0 && dut.b_iso == '0, "operands isolated while idle");
      if (x != '0 || y != '0) n_isolated++;
    end
    edges0 = gclk_edges;
    if (e) begin
      p = ref_smul(x, y, XLEN);
      if (p[127]) n_negative++;
      if (c) begin model = ACC_W'(p); n_clear++; end
      else begin
        model = model + ACC_W'(p);
        // signed overflow of the accumulator: same-sign operands, sign flips
        if (acc_prev[ACC_W-1] == p[127] && model[ACC_W-1] != p[127]) n_wrap++;
      end
      n_mac++;
    end else n_idle++;
    @(posedge clk);
    #1;
    check(valid == e, "valid_o one cycle after en_i");
    check(acc == model, e ? "accumulate result" : "hold while idle");
    if (e) check(gclk_edges == edges0 + 1, "gated clock pulses when enabled");
    else begin
      check(gclk_edges == edges0, "gated clock silent when idle");
      if (gclk_edges == edges0) n_gated++;
    end
  endtask

  initial begin
    #5000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [XLEN-1:0] taps [16], samples [64];
    model = '0;
    #1 rst_n = 1'b0;   // a falling edge applies the asynchronous reset
    repeat (3) @(negedge clk);
    check(acc == '0 && valid == 1'b0, "reset state");
    rst_n = 1'b1;

    // FIR filter: y[n] = sum_k h[k] * x[n-k], 16 taps, 16-bit signed data.
    foreach (taps[k])    taps[k]    = XLEN'($signed(16'($urandom)));
    foreach (samples[i]) samples[i] = XLEN'($signed(16'($urandom)));
    for (int n = 15; n < 64; n++) begin
      for (int k = 0; k < 16; k++) begin
        cycle(1'b1, k == 0, taps[k], samples[n-k]);
        if ($urandom_range(0, 3) == 0)
          cycle(1'b0, 1'b0, {$urandom, $urandom}, {$urandom, $urandom});
      end
    end

    // Full-width random operands, random enable and clear.
    for (int i = 0; i < 500; i++)
      cycle(($urandom_range(0, 2) != 0), ($urandom_range(0, 9) == 0),
            {$urandom, $urandom}, {$urandom, $urandom});

    // Wrap: (-2**63)**2 = 2**126; adding it twice passes 2**127.
    cycle(1'b1, 1'b1, 64'h8000_0000_0000_0000, 64'h8000_0000_0000_0000);
    cycle(1'b1, 1'b0, 64'h8000_0000_0000_0000, 64'h8000_0000_0000_0000);
    check(acc == {1'b1, 127'd0}, "accumulator wraps modulo 2**128");
    cycle(1'b1, 1'b0, 64'h8000_0000_0000_0000, 64'h8000_0000_0000_0000);
    cycle(1'b1, 1'b0, 64'h8000_0000_0000_0000, 64'h8000_0000_0000_0000);
    check(acc == '0, "accumulator wraps back to zero");

    // Mid-run reset clears the accumulator.
    @(negedge clk);
    rst_n = 1'b0; en = 1'b0;
    #1 check(acc == '0 && valid == 1'b0, "asynchronous reset");
    model = '0;
    @(negedge clk);
    rst_n = 1'b1;
    cycle(1'b1, 1'b0, 64'd7, -64'd6);

    $display("mac %0d clear %0d idle %0d gated %0d isolated %0d negative %0d wrap %0d",
             n_mac, n_clear, n_idle, n_gated, n_isolated, n_negative, n_wrap);
    check(n_mac > 0,      "mechanism: accumulate");
    check(n_clear > 0,    "mechanism: clear");
    check(n_gated > 0,    "mechanism: clock gated while idle");
    check(n_isolated > 0, "mechanism: operand isolation");
    check(n_negative > 0, "mechanism: negative product");
    check(n_wrap > 0,     "mechanism: accumulator wrap");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
