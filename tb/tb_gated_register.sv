// tb_gated_register: self-checking test of the 16-bit clock-gated register at
// its default grouping (groups of 2 flip-flops, one MBFF per clock gate).
//
// Each cycle every group independently either keeps its bits or takes new
// random bits. The testbench checks the register against a plain reference
// register, checks each group's enable against its own slice of D and Q, and
// counts the gated clock pulses of every group: a group must be clocked in
// exactly the cycles in which its own bits change.
module tb_gated_register;
  localparam int unsigned W = 16;
  localparam int unsigned G = 2;
  localparam int unsigned NG = W / G;
  int checks = 0, failures = 0;

  logic          clk = 1'b0, set = 1'b0, reset = 1'b0;
  logic [W-1:0]  d = '0, q, ref_q;
  logic [NG-1:0] grp_en;
  int            pulses [NG];
  int            gated_total = 0;

  gated_register #(.WIDTH(W), .GROUP_FF(G)) dut (
    .clk(clk), .set(set), .reset(reset), .d(d), .q(q), .grp_en(grp_en));

  for (genvar g = 0; g < NG; g++) begin : g_cnt
    initial pulses[g] = 0;
    always @(posedge dut.g_grp[g].u_grp.gclk) pulses[g]++;
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s: q=%h ref=%h at %0t", what, q, ref_q, $time);
    end
  endtask

  initial begin
    #200000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int p0 [NG];
    logic [NG-1:0] changes;
    #1 reset = 1'b1; #2 reset = 1'b0; ref_q = '0;
    #1 check(q == ref_q, "reset");
    for (int cyc = 0; cyc < 300; cyc++) begin
      d = ref_q;
      for (int g = 0; g < NG; g++)
        if ($urandom_range(2) == 0) d[g*G +: G] = G'($urandom);
      for (int g = 0; g < NG; g++) begin
        changes[g] = (d[g*G +: G] != ref_q[g*G +: G]);
        p0[g] = pulses[g];
      end
      #2 check(grp_en == changes, "group enables");
      #3 clk = 1'b1;
      #1;
      for (int g = 0; g < NG; g++) begin
        check((pulses[g] - p0[g]) == int'(changes[g]), "group clock pulse");
        if (!changes[g]) gated_total++;
      end
      ref_q = d;
      check(q == ref_q, "q after edge");
      #4 clk = 1'b0;
    end
    set = 1'b1; #1 ref_q = '1; check(q == ref_q, "set");
    set = 1'b0; reset = 1'b1; #1 ref_q = '0; check(q == ref_q, "reset");
    reset = 1'b0; #1;
    check(gated_total > 0, "some group pulses suppressed");
    $display("suppressed group pulses=%0d of %0d", gated_total, 300 * NG);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
