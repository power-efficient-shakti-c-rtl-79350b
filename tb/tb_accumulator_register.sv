// tb_accumulator_register: self-checking test of the accumulator register.
//
// Runs random enable / clear / addend sequences on a free-running clock and
// compares the register after every edge with a model: hold when disabled,
// load on clear, add otherwise (modulo 2**128). Also checks the reset value.
module tb_accumulator_register;
  localparam int ACC_W = 128;
  logic clk = 1'b0, rst_n = 1'b1, en = 1'b0, clr = 1'b0;
  logic [ACC_W-1:0] addend = '0, acc, model;
  int checks = 0, failures = 0;
  int n_hold = 0, n_clr = 0, n_add = 0;

  accumulator_register #(.ACC_W(ACC_W)) dut (
    .clk_i(clk), .rst_ni(rst_n), .en_i(en), .clr_i(clr), .addend_i(addend), .acc_o(acc));

  always #5 clk = ~clk;

  initial begin
    #200000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    model = '0;
    #1 rst_n = 1'b0;   // a falling edge applies the asynchronous reset
    repeat (2) @(negedge clk);
    checks++;
    if (acc !== '0) begin failures++; $display("FAIL reset value"); end
    rst_n = 1'b1;
    for (int i = 0; i < 2000; i++) begin
      @(negedge clk);
      en     = ($urandom_range(0, 3) != 0);
      clr    = ($urandom_range(0, 7) == 0);
      addend = {$urandom, $urandom, $urandom, $urandom};
      if (!en)     begin n_hold++; end
      else if (clr) begin model = addend; n_clr++; end
      else          begin model = model + addend; n_add++; end
      @(posedge clk);
      #1;
      checks++;
      if (acc !== model) begin
        failures++;
        $display("FAIL cycle %0d en=%0b clr=%0b acc=%h model=%h", i, en, clr, acc, model);
      end
    end
    $display("hold %0d clear %0d add %0d", n_hold, n_clr, n_add);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
