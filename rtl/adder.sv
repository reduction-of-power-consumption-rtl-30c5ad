// adder: W-bit binary adder, combinational.
//
// Adds the product register to the accumulator register. The sum wraps
// modulo 2**W, as a 16-bit accumulator without saturation does; the carry out
// of the top bit is brought out so that a wrap can be observed. Wrapping and
// the carry output are this design's choices; the source design only shows a
// 16-bit adder.
//
// Interface: a, b [W-1:0] in; sum [W-1:0] and carry out; no clock.
module adder #(
  parameter int unsigned W = mac_pkg::ACC_W
) (
  input  logic [W-1:0] a,
  input  logic [W-1:0] b,
  output logic [W-1:0] sum,
  output logic         carry
);
  always_comb {carry, sum} = {1'b0, a} + {1'b0, b};
endmodule
