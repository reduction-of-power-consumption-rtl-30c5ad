// multiplier: unsigned A_W x B_W multiplier, combinational.
//
// Forms the full-width product p = a * b of two unsigned operands. The source
// design gives two 8-bit inputs and a 16-bit product; it does not say how the
// multiplier is built or whether the operands are signed, so this is the
// plain unsigned product that synthesis maps to its own multiplier structure.
//
// Interface: a[A_W-1:0], b[B_W-1:0] in, p[A_W+B_W-1:0] out; no clock.
module multiplier #(
  parameter int unsigned A_W = mac_pkg::OPERAND_W,
  parameter int unsigned B_W = mac_pkg::OPERAND_W
) (
  input  logic [A_W-1:0]     a,
  input  logic [B_W-1:0]     b,
  output logic [A_W+B_W-1:0] p
);
  always_comb p = (A_W+B_W)'(a) * (A_W+B_W)'(b);
endmodule
