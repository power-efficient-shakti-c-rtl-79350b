// operand_isolation: keeps the multiplier inputs still while the MAC is idle.
//
// Function: when en_i is high the two operands pass unchanged; when it is low
// both outputs are forced to zero, so changes on the operand buses (which in
// a processor toggle every cycle with unrelated traffic) do not ripple through
// the multiplier and adder. Built as an AND of each operand bit with the
// enable, the simplest gate that does this; the gating style is this design's
// choice, the function (restricting operand propagation while idle) is the
// MAC architecture's.
//
// Interface: en_i enable, a_i/b_i operands, a_o/b_o isolated operands. Purely
// combinational, no latency.
module operand_isolation #(
  parameter int unsigned W = mac_pkg::XLEN
) (
  input  logic         en_i,
  input  logic [W-1:0] a_i,
  input  logic [W-1:0] b_i,
  output logic [W-1:0] a_o,
  output logic [W-1:0] b_o
);
  always_comb begin
    a_o = a_i & {W{en_i}};
    b_o = b_i & {W{en_i}};
  end
endmodule
