// tb_mbff2: self-checking test of the 2-bit multi-bit flip-flop cell.
//
// Walks the cell through the rows of its truth table (both bits loaded on a
// rising clock edge with every D combination, and held with no edge while D
// changes), then exercises the per-bit asynchronous set and reset, including
// reset winning over set and one bit being set or cleared while the other
// keeps its value. A reference bit pair is updated by the testbench itself.
module tb_mbff2;
  int checks = 0, failures = 0;
  logic       clk = 1'b0;
  logic [1:0] d = '0, set = '0, reset = '0, q;
  logic [1:0] ref_q;

  mbff2 dut (.clk(clk), .d(d), .set(set), .reset(reset), .q(q));

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s: q=%b expected %b at %0t", what, q, ref_q, $time);
    end
  endtask

  task automatic edge_load(input logic [1:0] v);
    d = v;
    #5 clk = 1'b1;
    ref_q = v;
    #5 clk = 1'b0;
    #1 check(q == ref_q, "load on rising edge");
  endtask

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #1 reset = 2'b11; #2; reset = 2'b00; ref_q = 2'b00;
    #1 check(q == ref_q, "reset both bits");
    // truth table rows: load each D pair on a rising edge
    for (int r = 0; r < 2; r++)
      for (int v = 0; v < 4; v++) edge_load(2'(v));
    // hold: D changes, no clock edge
    edge_load(2'b10);
    for (int v = 0; v < 4; v++) begin
      d = 2'(v); #3;
      check(q == ref_q, "hold without clock edge");
    end
    // random loads
    for (int i = 0; i < 50; i++) edge_load(2'($urandom));
    // per-bit asynchronous set and reset
    edge_load(2'b00);
    set = 2'b01; #1; ref_q = 2'b01; check(q == ref_q, "set bit 0 only");
    set = 2'b00; #1;
    set = 2'b10; #1; ref_q = 2'b11; check(q == ref_q, "set bit 1 only");
    set = 2'b00; #1;
    reset = 2'b10; #1; ref_q = 2'b01; check(q == ref_q, "reset bit 1 only");
    reset = 2'b00; #1;
    reset = 2'b01; set = 2'b01; #1; ref_q = 2'b00; check(q == ref_q, "reset wins over set");
    reset = 2'b00; set = 2'b00; #1; check(q == ref_q, "bit stays cleared after reset and set");
    // clock while set held: stays set
    d = 2'b00; set = 2'b11; #1;
    #5 clk = 1'b1; #5 clk = 1'b0; #1;
    ref_q = 2'b11; check(q == ref_q, "set dominates clock");
    set = 2'b00; #1;
    edge_load(2'b00);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
