// tb_operand_isolation: self-checking test of operand isolation.
//
// Applies random operands with a random enable and checks that both outputs
// equal the inputs when enabled and are zero when not.
module tb_operand_isolation;
  localparam int W = 64;
  logic         en;
  logic [W-1:0] a, b, ao, bo;
  int checks = 0, failures = 0;

  operand_isolation #(.W(W)) dut (.en_i(en), .a_i(a), .b_i(b), .a_o(ao), .b_o(bo));

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 1000; i++) begin
      en = 1'($urandom_range(0, 1));
      a  = {$urandom, $urandom};
      b  = {$urandom, $urandom};
      #1;
      checks += 2;
      if (ao !== (en ? a : '0)) begin failures++; $display("FAIL a en=%0b", en); end
      if (bo !== (en ? b : '0)) begin failures++; $display("FAIL b en=%0b", en); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
