// mac_pkg: sizes shared by the clock-gated multiply-accumulate (MAC) unit.
//
// XLEN is the integer register width of the 64-bit RISC-V core whose execute
// stage the MAC unit sits in; operands arrive at this width. Accumulators
// default to 2*XLEN bits so that one full signed product fits without loss;
// that width is a choice of this design, not a given.
package mac_pkg;
  parameter int unsigned XLEN  = 64;        // operand width (64-bit core)
endpackage
