// mac_unit: clock-gated, operand-isolated multiply-accumulate unit.
//
// A DSP accelerator for the execute stage of a 64-bit RISC-V core. Each cycle
// in which en_i is high it computes acc = a_i * b_i + acc (signed), or
// acc = a_i * b_i when clr_i is also high, starting a new sum. Two low-power
// measures keep the unit quiet while it is idle (en_i low):
//   * operand isolation forces the multiplier inputs to zero, so toggling on
//     the operand buses does not reach the multiplier and adder;
//   * a clock-gating cell stops the clock of the accumulator register, so its
//     flip-flops see no clock edges.
// The datapath is operand_isolation -> signed_multiplier ->
// accumulator_register (adder + enable-controlled register on the gated
// clock), with clock_gate producing that clock from clk_i and en_i.
//
// The three datapath parts, the role of the enable (operand propagation and
// output update) and gating of the MAC registers with GCLK = CLK . EN follow
// the architecture this unit implements. The clear input, the 2*XLEN-bit
// accumulator, the valid_o flag and the reset are this design's choices; the
// unit's connection to the core's instruction decode is not defined here.
//
// Interface: clk_i, rst_ni (async, active low), en_i (operands valid),
// clr_i (start a new sum), a_i/b_i (signed XLEN-bit operands), acc_o
// (accumulator), valid_o (acc_o holds the result of the previous cycle's
// operation). Timing: inputs are sampled at the rising edge of clk_i; en_i
// must be settled while clk_i is low. Latency one cycle, one MAC per cycle.
module mac_unit #(
  parameter int unsigned XLEN  = mac_pkg::XLEN,
  parameter int unsigned ACC_W = 2 * XLEN
) (
  input  logic             clk_i,
  input  logic             rst_ni,
  input  logic             en_i,
  input  logic             clr_i,
  input  logic [XLEN-1:0]  a_i,
  input  logic [XLEN-1:0]  b_i,
  output logic [ACC_W-1:0] acc_o,
  output logic             valid_o
);
  logic                     gclk;
  logic [XLEN-1:0]          a_iso, b_iso;
  logic signed [2*XLEN-1:0] product;
  logic [ACC_W-1:0]         addend;

  clock_gate u_cg (
    .clk_i  (clk_i),
    .en_i   (en_i),
    .gclk_o (gclk)
  );

  operand_isolation #(.W(XLEN)) u_iso (
    .en_i (en_i),
    .a_i  (a_i),
    .b_i  (b_i),
    .a_o  (a_iso),
    .b_o  (b_iso)
  );

  signed_multiplier #(.W(XLEN)) u_mul (
    .a_i (a_iso),
    .b_i (b_iso),
    .p_o (product)
  );

  // Sign-extend (or, for a narrower accumulator, truncate) the product.
  always_comb begin
    addend = ACC_W'(product);
  end

  accumulator_register #(.ACC_W(ACC_W)) u_acc (
    .clk_i    (gclk),
    .rst_ni   (rst_ni),
    .en_i     (en_i),
    .clr_i    (clr_i),
    .addend_i (addend),
    .acc_o    (acc_o)
  );

  always_ff @(posedge clk_i or negedge rst_ni) begin
    if (!rst_ni) valid_o <= 1'b0;
    else         valid_o <= en_i;
  end

  // Operand isolation rule: an idle unit presents zeros to the multiplier.
  a_isolated: assert property (@(posedge clk_i) !en_i |-> (a_iso == '0 && b_iso == '0));
endmodule
