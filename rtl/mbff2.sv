// mbff2: 2-bit multi-bit flip-flop (MBFF) cell.
//
// Two positive-edge D flip-flops merged into one cell. In a transistor-level
// cell the two bits share the clock inverters that generate the internal
// clock phases for the master and slave latches; at register-transfer level
// that sharing appears as a single clock pin for both bits. On a rising clock
// edge Q1 takes D1 and Q2 takes D2; otherwise both hold. Each bit has its own
// set and reset pin (2-bit set and 2-bit reset vectors), as the source design
// states. Set and reset act asynchronously and active-high, and reset wins
// over set; polarity, priority and asynchronous action are this design's
// choices. As with any edge-modelled asynchronous set/reset flip-flop, a bit
// that is reset while set is also held stays 0 when reset is released, until
// the next clock edge or set edge. Synthesis flows without a combined
// set/reset flip-flop cell cannot map this cell; the behaviour is kept as a
// true set/reset flip-flop rather than merging the two pins.
//
// Interface:
//   clk         clock shared by both bits (normally a gated group clock)
//   d[1:0]      data inputs D2, D1
//   set[1:0]    per-bit asynchronous set, active high
//   reset[1:0]  per-bit asynchronous reset, active high
//   q[1:0]      outputs Q2, Q1
module mbff2 (
  input  logic       clk,
  input  logic [1:0] d,
  input  logic [1:0] set,
  input  logic [1:0] reset,
  output logic [1:0] q
);
  for (genvar i = 0; i < 2; i++) begin : g_bit
    logic q_bit, rst_bit, set_bit;
    assign rst_bit = reset[i];
    assign set_bit = set[i];
    always_ff @(posedge clk or posedge rst_bit or posedge set_bit) begin
      if (rst_bit)      q_bit <= 1'b0;
      else if (set_bit) q_bit <= 1'b1;
      else              q_bit <= d[i];
    end
    assign q[i] = q_bit;
  end
endmodule
