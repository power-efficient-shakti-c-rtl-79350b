// signed_multiplier: two's-complement multiplier, W x W -> 2W bits.
//
// Function: p_o = a_i * b_i with both operands and the result signed. The full
// double-width product is returned so that no information is lost before
// accumulation. Written as a behavioural multiply so that synthesis picks the
// multiplier architecture (the structure of the multiplier is not specified;
// only its signed function is).
//
// Interface: a_i, b_i signed operands; p_o signed product. Combinational.
module signed_multiplier #(
  parameter int unsigned W = mac_pkg::XLEN
) (
  input  logic signed [W-1:0]   a_i,
  input  logic signed [W-1:0]   b_i,
  output logic signed [2*W-1:0] p_o
);
  always_comb begin
    p_o = (2*W)'(a_i) * (2*W)'(b_i);
  end
endmodule
