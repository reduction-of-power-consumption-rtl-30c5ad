// tb_dd_clock_gate: self-checking test of the data-driven clock gate.
//
// Drives a 4-bit group with random D and Q vectors, changed while clk is low,
// and checks that (1) clk_en equals |(d ^ q) at all times, (2) gclk pulses in
// a cycle exactly when d differed from q just edges_before the rising edge, and
// (3) a change of D while clk is high (which would make a bad gate glitch)
// neither starts nor cuts off a gclk pulse. About one cycle in four leaves
// d == q so that both gated and ungated cycles occur.
module tb_dd_clock_gate;
  localparam int unsigned K = 4;
  int checks = 0, failures = 0;
  int gated = 0, passed = 0;

  logic         clk = 1'b0;
  logic [K-1:0] d = '0, q = '0;
  logic         clk_en, gclk;
  int           gclk_edges = 0;

  dd_clock_gate #(.K(K)) dut (.clk(clk), .d(d), .q(q), .clk_en(clk_en), .gclk(gclk));

  always @(posedge gclk) gclk_edges++;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s at %0t", what, $time);
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
    bit expect_pulse;
    int edges_before;
    for (int cyc = 0; cyc < 400; cyc++) begin
      // low phase: new vectors
      d = K'($urandom);
      q = ($urandom_range(3) == 0) ? d : K'($urandom);
      #2;
      check(clk_en == |(d ^ q), "clk_en during low phase");
      check(gclk == 1'b0, "gclk low while clk low");
      expect_pulse = (d != q);
      edges_before = gclk_edges;
      #3 clk = 1'b1;
      #1;
      check((gclk_edges - edges_before) == int'(expect_pulse), "gclk pulse decision");
      check(gclk == expect_pulse, "gclk level in high phase");
      if (expect_pulse) passed++; else gated++;
      // disturb D during the high phase: the latched decision must hold
      d = ~d;
      #2;
      check(clk_en == |(d ^ q), "clk_en during high phase");
      check(gclk == expect_pulse, "gclk unaffected by D in high phase");
      #2 clk = 1'b0;
      #1;
      check(gclk == 1'b0, "gclk falls with clk");
    end
    check(gated > 0, "some cycles gated");
    check(passed > 0, "some cycles clocked");
    $display("clocked cycles=%0d gated cycles=%0d", passed, gated);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
