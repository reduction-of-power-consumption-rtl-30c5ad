// tb_mac_groups: runs the MAC unit with the four clock-gating group sizes
// 2, 4, 8 and 16 flip-flops side by side on one operand stream.
//
// All four instances must compute the same, correct accumulator values (the
// gating never changes function). For each group size the testbench counts
// the flip-flop clock pulses that reach the two registers and the pulses the
// gates suppress. Because groups are contiguous bit slices, a gated group of
// 2k bits implies that both of its k-bit halves are gated too, so the number
// of suppressed flip-flop pulses can only fall as the group grows; the
// testbench checks that ordering, which is the gating-versus-overhead
// trade-off of the design (fewer clock gates, fewer disabled pulses).
// Operands are drawn with a low toggle rate: each operand keeps its value
// with probability 3/4 and otherwise changes in one random bit.
module tb_mac_groups;
  localparam int unsigned NCFG = 4;
  localparam int unsigned GS [NCFG] = '{2, 4, 8, 16};
  localparam int unsigned NCYC = 4000;
  int checks = 0, failures = 0;

  logic        clk = 1'b0, reset = 1'b0;
  logic [7:0]  in_1 = '0, in_2 = '0;
  logic [15:0] ain [NCFG], out [NCFG];
  logic [15:0] ref_ain = '0, ref_out = '0;
  longint      ff_pulses [NCFG];

  for (genvar c = 0; c < NCFG; c++) begin : g_cfg
    localparam int unsigned G  = GS[c];
    localparam int unsigned NG = 16 / G;
    logic [15:0]   multi_out, aout;
    logic          carry;
    logic [NG-1:0] pen, aen;
    mac_top #(.GROUP_FF(G)) u_mac (
      .clk(clk), .reset(reset), .set(1'b0), .in_1(in_1), .in_2(in_2),
      .multi_out(multi_out), .ain(ain[c]), .aout(aout), .out(out[c]), .carry(carry),
      .prod_grp_en(pen), .acc_grp_en(aen));
    initial ff_pulses[c] = 0;
    for (genvar g = 0; g < NG; g++) begin : g_grp
      always @(posedge u_mac.u_prod_reg.g_grp[g].u_grp.gclk) ff_pulses[c] += longint'(G);
      always @(posedge u_mac.u_acc_reg.g_grp[g].u_grp.gclk)  ff_pulses[c] += longint'(G);
    end
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s at %0t", what, $time);
    end
  endtask

  initial begin
    #2000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #1 reset = 1'b1; #1 reset = 1'b0; #1;
    for (int i = 0; i < NCYC; i++) begin
      if ($urandom_range(3) == 0) in_1 ^= 8'(1 << $urandom_range(7));
      if ($urandom_range(3) == 0) in_2 ^= 8'(1 << $urandom_range(7));
      #4 clk = 1'b1;
      ref_out = ref_out + ref_ain;
      ref_ain = 16'(in_1) * 16'(in_2);
      #1;
      for (int c = 0; c < NCFG; c++) begin
        check(ain[c] == ref_ain, "product register");
        check(out[c] == ref_out, "accumulator register");
      end
      #4 clk = 1'b0;
    end
    for (int c = 0; c < NCFG; c++) begin
      longint total;
      total = longint'(NCYC) * 32;
      $display("group of %0d FFs: %0d clock gates, FF clock pulses %0d of %0d (%0d%% suppressed)",
               GS[c], 32 / GS[c], ff_pulses[c], total, 100 * (total - ff_pulses[c]) / total);
      check(ff_pulses[c] < total, "some pulses suppressed");
      if (c > 0) check(ff_pulses[c] >= ff_pulses[c-1], "larger groups suppress no more pulses");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
