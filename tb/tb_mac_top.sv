// tb_mac_top: end-to-end self-checking test of the clock-gated MAC unit at its
// default parameters (8-bit operands, 16-bit registers, groups of 2
// flip-flops = one MBFF per clock gate).
//
// Phases:
//   1. reset, then the operand sequence of the reference waveform
//      (2*32, 13*2, 4*32, 16*16): the accumulator must read 64, 90, 218, 474
//      and each product must reach out exactly two edges after it is applied;
//   2. operands held constant, then zero operands: whole registers must stop
//      receiving clock pulses while out keeps its (re)computed value;
//   3. asynchronous set and reset in the middle of operation;
//   4. a long random run, with operands often repeated, against a cycle
//      model of multiplier, product register, adder and accumulator, until the
//      accumulator has wrapped several times.
// Mechanisms counted (each must occur): suppressed group pulses in the product
// and in the accumulator register, delivered group pulses in both, a cycle in
// which every group of a register is gated, set, reset, accumulator wrap.
module tb_mac_top;
  localparam int unsigned NG = 16 / 2;
  int checks = 0, failures = 0;

  logic        clk = 1'b0, reset = 1'b0, set = 1'b0;
  logic [7:0]  in_1 = '0, in_2 = '0;
  logic [15:0] multi_out, ain, aout, out;
  logic        carry;
  logic [NG-1:0] prod_grp_en, acc_grp_en;

  mac_top dut (
    .clk(clk), .reset(reset), .set(set), .in_1(in_1), .in_2(in_2),
    .multi_out(multi_out), .ain(ain), .aout(aout), .out(out), .carry(carry),
    .prod_grp_en(prod_grp_en), .acc_grp_en(acc_grp_en));

  // reference model state
  logic [15:0] ref_ain = '0, ref_out = '0;

  // mechanism counters
  int prod_gated = 0, acc_gated = 0, prod_clocked = 0, acc_clocked = 0;
  int prod_all_gated = 0, acc_all_gated = 0, wraps = 0, sets = 0, resets = 0;
  int prod_pulses [NG], acc_pulses [NG];

  for (genvar g = 0; g < NG; g++) begin : g_cnt
    initial begin prod_pulses[g] = 0; acc_pulses[g] = 0; end
    always @(posedge dut.u_prod_reg.g_grp[g].u_grp.gclk) prod_pulses[g]++;
    always @(posedge dut.u_acc_reg.g_grp[g].u_grp.gclk)  acc_pulses[g]++;
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s at %0t: ain=%0d out=%0d (ref %0d %0d)", what, $time, ain, out, ref_ain, ref_out);
    end
  endtask

  // one clock cycle with operands x, y applied during the low phase
  task automatic cycle(input logic [7:0] x, input logic [7:0] y);
    int pp [NG], ap [NG];
    logic [15:0] prod, nxt;
    bit all_p, all_a;
    in_1 = x; in_2 = y;
    prod = 16'(x) * 16'(y);
    nxt  = ref_out + ref_ain;
    #2;
    check(multi_out == prod, "multiplier output");
    check(aout == nxt, "adder output");
    check(carry == ((32'(ref_out) + 32'(ref_ain)) > 65535), "carry");
    for (int g = 0; g < NG; g++) begin
      pp[g] = prod_pulses[g]; ap[g] = acc_pulses[g];
    end
    #3 clk = 1'b1;
    #1;
    if (carry) wraps++;
    all_p = 1'b1; all_a = 1'b1;
    for (int g = 0; g < NG; g++) begin
      bit pc, ac;
      pc = (prod[2*g +: 2] != ref_ain[2*g +: 2]);
      ac = (nxt[2*g +: 2]  != ref_out[2*g +: 2]);
      check((prod_pulses[g] - pp[g]) == int'(pc), "product group clock");
      check((acc_pulses[g] - ap[g]) == int'(ac), "accumulator group clock");
      if (pc) begin prod_clocked++; all_p = 1'b0; end else prod_gated++;
      if (ac) begin acc_clocked++;  all_a = 1'b0; end else acc_gated++;
    end
    if (all_p) prod_all_gated++;
    if (all_a) acc_all_gated++;
    ref_ain = prod;
    ref_out = nxt;
    check(ain == ref_ain, "product register");
    check(out == ref_out, "accumulator register");
    #4 clk = 1'b0;
  endtask

  task automatic do_reset();
    #1 reset = 1'b1; #1 reset = 1'b0; #1;
    ref_ain = '0; ref_out = '0; resets++;
    check(ain == 0 && out == 0, "reset clears both registers");
  endtask

  initial begin
    #2000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    do_reset();
    // 1. reference waveform sequence and two-edge latency
    cycle(2, 32);   check(ain == 64 && out == 0, "latency: product after one edge");
    cycle(13, 2);   check(out == 64, "first accumulation");
    cycle(4, 32);   check(out == 90, "second accumulation");
    cycle(16, 16);  check(out == 218, "third accumulation");
    cycle(0, 0);    check(out == 474, "fourth accumulation");
    // 2. constant operands, then zero operands
    for (int i = 0; i < 3; i++) cycle(7, 9);
    for (int i = 0; i < 4; i++) cycle(0, 5);
    check(prod_all_gated > 0, "product register fully gated");
    check(acc_all_gated > 0, "accumulator fully gated");
    // 3. asynchronous set, operation, reset
    #1 set = 1'b1; #1 set = 1'b0; #1;
    ref_ain = '1; ref_out = '1; sets++;
    check(ain == 16'hFFFF && out == 16'hFFFF, "set sets both registers");
    cycle(1, 1);
    cycle(3, 3);
    do_reset();
    // 4. long random run
    for (int i = 0; i < 3000; i++) begin
      if ($urandom_range(3) == 0) cycle(in_1, in_2);
      else cycle(8'($urandom), 8'($urandom));
    end
    check(prod_gated > 0, "product pulses suppressed");
    check(acc_gated > 0, "accumulator pulses suppressed");
    check(prod_clocked > 0 && acc_clocked > 0, "groups clocked");
    check(wraps > 0, "accumulator wrapped");
    check(sets > 0 && resets > 0, "set and reset");
    $display("product groups: clocked=%0d gated=%0d fully-gated cycles=%0d",
             prod_clocked, prod_gated, prod_all_gated);
    $display("accumulator groups: clocked=%0d gated=%0d fully-gated cycles=%0d",
             acc_clocked, acc_gated, acc_all_gated);
    $display("wraps=%0d sets=%0d resets=%0d", wraps, sets, resets);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
