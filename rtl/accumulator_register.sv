// accumulator_register: adder plus enable-controlled accumulator register.
//
// Function: on a rising clock edge with en_i high the register loads
// acc_o + addend_i, or addend_i alone when clr_i is also high (the first term
// of a new sum). With en_i low it holds its value. Arithmetic is modulo
// 2**ACC_W (wraps on overflow). In the MAC unit this register is clocked by
// the gated clock, so en_i is high at every edge it sees; the enable test is
// kept so that the register is also correct on an ungated clock.
//
// The accumulate rule MAC = A x B + Accumulator and the enable-controlled
// output register come from the MAC architecture; the clear input, the wrap
// on overflow and the asynchronous active-low reset to zero are this design's
// choices.
//
// Interface: clk_i, rst_ni (async, active low), en_i, clr_i, addend_i (signed
// product, already ACC_W wide), acc_o. Latency: acc_o shows the new value one
// clock edge after en_i.
module accumulator_register #(
  parameter int unsigned ACC_W = 2 * mac_pkg::XLEN
) (
  input  logic             clk_i,
  input  logic             rst_ni,
  input  logic             en_i,
  input  logic             clr_i,
  input  logic [ACC_W-1:0] addend_i,
  output logic [ACC_W-1:0] acc_o
);
  logic [ACC_W-1:0] sum;

  always_comb begin
    sum = clr_i ? addend_i : acc_o + addend_i;
  end

  always_ff @(posedge clk_i or negedge rst_ni) begin
    if (!rst_ni)   acc_o <= '0;
    else if (en_i) acc_o <= sum;
  end
endmodule
