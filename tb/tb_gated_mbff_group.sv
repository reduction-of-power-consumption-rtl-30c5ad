// tb_gated_mbff_group: self-checking test of one clock-gated MBFF group.
//
// Uses a 4-flip-flop group (two MBFF cells behind one clock gate). Each cycle
// D is either kept equal to Q or changed in a random subset of bits. The
// testbench checks that Q always equals a plain reference register, that the
// group clock pulses exactly in the cycles where some bit changes, and that
// asynchronous set and reset reach every bit even when the group clock is
// stopped.
module tb_gated_mbff_group;
  localparam int unsigned G = 4;
  int checks = 0, failures = 0;
  int gated = 0, clocked = 0;

  logic         clk = 1'b0, set = 1'b0, reset = 1'b0;
  logic [G-1:0] d = '0, q, ref_q;
  logic         clk_en, gclk;
  int           pulses = 0;

  gated_mbff_group #(.GROUP_FF(G)) dut (
    .clk(clk), .set(set), .reset(reset), .d(d), .q(q), .clk_en(clk_en), .gclk(gclk));

  always @(posedge gclk) pulses++;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s: q=%b ref=%b at %0t", what, q, ref_q, $time);
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
    int p0;
    #1 reset = 1'b1; #2 reset = 1'b0; ref_q = '0;
    #1 check(q == ref_q, "reset");
    for (int cyc = 0; cyc < 300; cyc++) begin
      d = ($urandom_range(2) == 0) ? ref_q : G'($urandom);
      #2 check(clk_en == (d != ref_q), "joint enable");
      p0 = pulses;
      if (d != ref_q) clocked++; else gated++;
      #3 clk = 1'b1;
      #1 check((pulses - p0) == int'(d != ref_q), "gated clock pulse");
      ref_q = d;
      check(q == ref_q, "q after edge");
      #4 clk = 1'b0;
    end
    // set and reset with the group clock stopped (d == q)
    d = ref_q; #2;
    set = 1'b1; #1 ref_q = '1; check(q == ref_q, "asynchronous set");
    set = 1'b0; #1;
    reset = 1'b1; #1 ref_q = '0; check(q == ref_q, "asynchronous reset");
    reset = 1'b0; #1;
    check(gated > 0 && clocked > 0, "both gated and clocked cycles");
    $display("clocked=%0d gated=%0d", clocked, gated);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
