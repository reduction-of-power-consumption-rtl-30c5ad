// gated_register: WIDTH-bit register made of clock-gated MBFF groups.
//
// The register is cut by bit position into WIDTH/GROUP_FF groups of adjacent
// bits: group g holds bits [g*GROUP_FF +: GROUP_FF]. Each group is a
// gated_mbff_group with its own data-driven clock gate, so a group whose bits
// do not change receives no clock pulse while the others are clocked. Grouping
// by bit position and the 16-bit width follow the source design; the
// contiguous-slice assignment of bits to groups is this design's choice.
//
// Interface:
//   clk, set, reset   free-running clock, asynchronous set / reset (active high,
//                     reset wins), applied to every bit
//   d, q              register data in and out
//   grp_en[g]         joint enable of group g for the coming edge
// Timing: q takes d at each rising edge of clk, one cycle of latency, exactly
// as a plain register; the gating only removes pulses that would not change q.
module gated_register #(
  parameter int unsigned WIDTH    = 16,
  parameter int unsigned GROUP_FF = mac_pkg::GROUP_FF
) (
  input  logic                         clk,
  input  logic                         set,
  input  logic                         reset,
  input  logic [WIDTH-1:0]             d,
  output logic [WIDTH-1:0]             q,
  output logic [WIDTH/GROUP_FF-1:0]    grp_en
);
  localparam int unsigned NGROUPS = WIDTH / GROUP_FF;

  initial begin
    assert (WIDTH % GROUP_FF == 0)
      else $error("WIDTH must be a multiple of GROUP_FF");
  end

  for (genvar g = 0; g < NGROUPS; g++) begin : g_grp
    logic gclk_unused;
    gated_mbff_group #(.GROUP_FF(GROUP_FF)) u_grp (
      .clk    (clk),
      .set    (set),
      .reset  (reset),
      .d      (d[g*GROUP_FF +: GROUP_FF]),
      .q      (q[g*GROUP_FF +: GROUP_FF]),
      .clk_en (grp_en[g]),
      .gclk   (gclk_unused)
    );
  end
endmodule
