// mac_top: multiply-accumulate unit built from clock-gated multi-bit flip-flops.
//
// Datapath, in the order the data flows:
//   multi_out = in_1 * in_2                    (combinational multiplier)
//   ain       = product register(multi_out)    (16-bit gated register)
//   aout      = ain + out                      (16-bit adder, wraps)
//   out       = accumulator register(aout)     (16-bit gated register)
// so each clock edge performs  out <= out + ain,  i.e. a <- a + b*c with the
// product delayed one cycle by the product register. Both registers hold
// their bits in 2-bit MBFF cells, clustered by bit position into groups of
// GROUP_FF flip-flops, each group clocked through its own data-driven clock
// gate. A group whose bits would not change gets no clock pulse; this saves
// clock power without changing any value the unit computes.
//
// The structure (8-bit operands, 16-bit multiplier output, product register,
// adder fed back from the accumulator register, 16-bit output) and the signal
// names in_1, in_2, multi_out, ain, aout, out, set and reset follow the source
// design. Unsigned arithmetic, wrap-around accumulation, asynchronous
// active-high set and reset (reset wins) and the enable / carry observation
// ports are this design's choices.
//
// Interface:
//   clk            free-running clock
//   reset, set     asynchronous, active high, clear / set every register bit
//   in_1, in_2     operands, sampled (as their product) at each rising edge
//   multi_out      multiplier output
//   ain            product register output
//   aout           adder output (next accumulator value)
//   out            accumulator register output
//   carry          carry out of the adder (accumulator wraps on this edge)
//   prod_grp_en    per-group clock enables of the product register
//   acc_grp_en     per-group clock enables of the accumulator register
// Timing: a product applied before edge n is in ain after edge n and has been
// added into out after edge n+1 (two cycles from operands to out).
module mac_top #(
  parameter int unsigned OPERAND_W = mac_pkg::OPERAND_W,
  parameter int unsigned ACC_W     = mac_pkg::ACC_W,
  parameter int unsigned GROUP_FF  = mac_pkg::GROUP_FF
) (
  input  logic                          clk,
  input  logic                          reset,
  input  logic                          set,
  input  logic [OPERAND_W-1:0]          in_1,
  input  logic [OPERAND_W-1:0]          in_2,
  output logic [2*OPERAND_W-1:0]        multi_out,
  output logic [2*OPERAND_W-1:0]        ain,
  output logic [ACC_W-1:0]              aout,
  output logic [ACC_W-1:0]              out,
  output logic                          carry,
  output logic [2*OPERAND_W/GROUP_FF-1:0] prod_grp_en,
  output logic [ACC_W/GROUP_FF-1:0]     acc_grp_en
);
  localparam int unsigned PRODUCT_W = 2 * OPERAND_W;

  initial begin
    assert (ACC_W >= PRODUCT_W) else $error("ACC_W must hold the full product");
  end

  multiplier #(.A_W(OPERAND_W), .B_W(OPERAND_W)) u_mul (
    .a (in_1),
    .b (in_2),
    .p (multi_out)
  );

  gated_register #(.WIDTH(PRODUCT_W), .GROUP_FF(GROUP_FF)) u_prod_reg (
    .clk    (clk),
    .set    (set),
    .reset  (reset),
    .d      (multi_out),
    .q      (ain),
    .grp_en (prod_grp_en)
  );

  adder #(.W(ACC_W)) u_add (
    .a     (ACC_W'(ain)),
    .b     (out),
    .sum   (aout),
    .carry (carry)
  );

  gated_register #(.WIDTH(ACC_W), .GROUP_FF(GROUP_FF)) u_acc_reg (
    .clk    (clk),
    .set    (set),
    .reset  (reset),
    .d      (aout),
    .q      (out),
    .grp_en (acc_grp_en)
  );
endmodule
