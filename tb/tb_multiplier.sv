// tb_multiplier: self-checking test of the 8x8 unsigned multiplier.
//
// Checks the corner operands (0, 1, 255) and the operand pairs seen in the
// reference waveform of the MAC (2*32, 13*2, 4*32, 16*16), then a sweep of
// random pairs, against products formed in the testbench with 32-bit
// integer arithmetic.
module tb_multiplier;
  int checks = 0, failures = 0;
  logic [7:0]  a, b;
  logic [15:0] p;
  int          corners [3] = '{0, 1, 255};

  multiplier dut (.a(a), .b(b), .p(p));

  task automatic try(input int x, input int y);
    int expected;
    a = 8'(x); b = 8'(y);
    expected = x * y;
    #1;
    checks++;
    if (int'(p) != expected) begin
      failures++;
      $display("FAIL %0d * %0d = %0d, expected %0d", x, y, p, expected);
    end
  endtask

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    foreach (corners[i]) foreach (corners[j]) try(corners[i], corners[j]);
    try(2, 32); try(13, 2); try(4, 32); try(16, 16);
    for (int i = 0; i < 2000; i++) try(int'($urandom_range(255)), int'($urandom_range(255)));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
