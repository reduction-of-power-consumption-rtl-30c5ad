// tb_adder: self-checking test of the 16-bit wrapping adder.
//
// Compares sum and carry with 32-bit integer addition for corner values and
// random operands, and makes sure both carrying and non-carrying additions
// were seen.
module tb_adder;
  int checks = 0, failures = 0;
  int carries = 0;
  logic [15:0] a, b, sum;
  logic        carry;

  adder dut (.a(a), .b(b), .sum(sum), .carry(carry));

  task automatic try(input int x, input int y);
    int full;
    a = 16'(x); b = 16'(y);
    full = x + y;
    #1;
    checks++;
    if (sum != 16'(full) || carry != (full > 65535)) begin
      failures++;
      $display("FAIL %0d + %0d = %0d c%0d", x, y, sum, carry);
    end
    if (carry) carries++;
  endtask

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    try(0, 0); try(65535, 1); try(65535, 65535); try(32768, 32768); try(64, 26);
    for (int i = 0; i < 2000; i++) try(int'($urandom_range(65535)), int'($urandom_range(65535)));
    checks++;
    if (carries == 0 || carries == checks - 1) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
