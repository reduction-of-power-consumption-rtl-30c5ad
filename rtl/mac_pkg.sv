// mac_pkg: widths shared by the clock-gated multiply-accumulate unit.
//
// The unit multiplies two 8-bit operands into a 16-bit product and
// accumulates products in a 16-bit register. Every storage bit sits in a
// 2-bit multi-bit flip-flop (MBFF), and the MBFFs are clustered by bit
// position into clock-gating groups. The operand, product and accumulator
// widths and the 2-bit MBFF size follow the source design; the default group
// size of 2 flip-flops (one MBFF per clock gate) is the configuration the
// design names as its main one.
package mac_pkg;
  localparam int unsigned OPERAND_W   = 8;   // width of in_1 and in_2
  localparam int unsigned ACC_W       = 16;  // product register, adder and accumulator register
  localparam int unsigned MBFF_BITS   = 2;   // flip-flops merged in one MBFF cell
  localparam int unsigned GROUP_FF    = 2;   // flip-flops sharing one clock gate
endpackage
