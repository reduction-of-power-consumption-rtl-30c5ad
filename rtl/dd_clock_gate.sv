// dd_clock_gate: data-driven integrated clock gate for a group of K flip-flops.
//
// Each flip-flop of the group compares the value waiting at its D input with
// the value it holds (one XOR per bit). The K comparison results are ORed into
// one joint enable: the group needs a clock pulse in the next cycle only if at
// least one of its bits is about to change. The joint enable passes through a
// latch that is transparent while clk is low and holds while clk is high, and
// the latched enable is ANDed with clk to form the gated clock. Holding the
// enable during the high phase keeps glitches on the enable (D changing while
// clk is high) from reaching the gated clock. The XOR / OR / latch / AND
// structure is the one of the source design; the latch is intentional and is
// the only storage element here.
//
// Interface:
//   clk     free-running clock
//   d, q    D inputs and present outputs of the K flip-flops of the group
//   clk_en  joint enable, |(d ^ q), before the latch (combinational)
//   gclk    gated clock for the group: high only during clk-high phases whose
//           preceding low phase ended with clk_en = 1
// Timing: the decision for a rising edge of clk is the value of clk_en just
// before that edge; gclk rises together with clk, with no cycle of latency.
module dd_clock_gate #(
  parameter int unsigned K = 2
) (
  input  logic         clk,
  input  logic [K-1:0] d,
  input  logic [K-1:0] q,
  output logic         clk_en,
  output logic         gclk
);
  logic en_latched;

  // k XOR gates ORed into one joint gating signal
  assign clk_en = |(d ^ q);

  // latch transparent while the clock is low
  always_latch begin
    if (!clk) en_latched = clk_en;
  end

  // clock gater: 2-input AND
  assign gclk = clk & en_latched;

  // the gated clock may only be high inside a high phase of clk
  always_comb begin
    assert (!gclk || clk) else $error("gated clock high while clk is low");
  end
endmodule
