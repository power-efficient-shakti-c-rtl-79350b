// tb_signed_multiplier: self-checking test of the signed multiplier.
//
// Checks corner operands (zero, one, minus one, most negative and most
// positive values) and random operands at 64 bits against a shift-and-add
// reference on magnitudes.
module tb_signed_multiplier;
  import tb_mac_ref_pkg::*;
  localparam int W = 64;
  logic [W-1:0]   a, b;
  logic [2*W-1:0] p;
  int checks = 0, failures = 0;
  logic [W-1:0] corner [6] = '{64'd0, 64'd1, '1, 64'h8000_0000_0000_0000,
                               64'h7fff_ffff_ffff_ffff, 64'd3};

  signed_multiplier #(.W(W)) dut (.a_i(a), .b_i(b), .p_o(p));

  task automatic apply(input logic [W-1:0] x, input logic [W-1:0] y);
    logic [127:0] exp;
    a = x; b = y;
    #1;
    exp = ref_smul(x, y, W);
    checks++;
    if (p !== exp) begin
      failures++;
      $display("FAIL %h * %h = %h, expected %h", x, y, p, exp);
    end
  endtask

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    foreach (corner[i]) foreach (corner[j]) apply(corner[i], corner[j]);
    for (int i = 0; i < 2000; i++) apply({$urandom, $urandom}, {$urandom, $urandom});
    for (int i = 0; i < 500; i++)  apply(64'($signed(16'($urandom))), 64'($signed(16'($urandom))));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
