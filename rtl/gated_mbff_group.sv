// gated_mbff_group: one data-driven clock-gated group of multi-bit flip-flops.
//
// GROUP_FF flip-flops are built from GROUP_FF/2 two-bit MBFF cells, and all of
// them are clocked by one data-driven clock gate. The gate compares the D and
// Q of every bit in the group; if none of them would change, the whole group
// receives no clock pulse in that cycle. Functionally the group behaves as a
// plain GROUP_FF-bit D register; only its clock activity differs. Combining
// MBFFs with one gate per group follows the source design; GROUP_FF must be a
// multiple of the 2-bit MBFF size (2, 4, 8 and 16 are the sizes it names).
//
// Interface:
//   clk       free-running clock
//   set       asynchronous set of every bit, active high
//   reset     asynchronous reset of every bit, active high (wins over set)
//   d, q      group data in and out
//   clk_en    the group's joint enable for the coming edge (|(d ^ q))
//   gclk      the group's gated clock
// Timing: q takes d at the rising edge of clk, one cycle of latency.
module gated_mbff_group #(
  parameter int unsigned GROUP_FF = mac_pkg::GROUP_FF
) (
  input  logic                clk,
  input  logic                set,
  input  logic                reset,
  input  logic [GROUP_FF-1:0] d,
  output logic [GROUP_FF-1:0] q,
  output logic                clk_en,
  output logic                gclk
);
  localparam int unsigned NCELLS = GROUP_FF / mac_pkg::MBFF_BITS;

  initial begin
    assert (GROUP_FF >= mac_pkg::MBFF_BITS && GROUP_FF % mac_pkg::MBFF_BITS == 0)
      else $error("GROUP_FF must be a nonzero multiple of the MBFF size");
  end

  dd_clock_gate #(.K(GROUP_FF)) u_icg (
    .clk    (clk),
    .d      (d),
    .q      (q),
    .clk_en (clk_en),
    .gclk   (gclk)
  );

  for (genvar c = 0; c < NCELLS; c++) begin : g_cell
    mbff2 u_mbff (
      .clk   (gclk),
      .d     (d[2*c +: 2]),
      .set   ({2{set}}),
      .reset ({2{reset}}),
      .q     (q[2*c +: 2])
    );
  end
endmodule
