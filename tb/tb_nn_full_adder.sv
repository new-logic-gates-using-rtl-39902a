// tb_nn_full_adder: checks the full adder built from two neural half adders
// and the neural OR gate. All eight input combinations are applied and
// {carry, sum} is compared with the integer a + b + cin. The test also
// counts how often the carry comes from each half adder (a & b from the
// first; (a ^ b) & cin from the second) and fails if either path never
// produces the carry. Combinational: checked one time step after the inputs
// change. A watchdog ends the run if it stalls.
module tb_nn_full_adder;

  int checks = 0;
  int failures = 0;

  logic clk = 1'b0;
  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (10000) @(posedge clk);
    failures++;
    $display("watchdog: simulation did not finish");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  logic a, b, cin, sum, carry;

  nn_full_adder dut (.a(a), .b(b), .cin(cin), .sum(sum), .carry(carry));

  int carry_first, carry_second, exp_total;

  initial begin
    carry_first = 0; carry_second = 0;
    a = 1'b0; b = 1'b0; cin = 1'b0;
    for (int v = 0; v < 8; v++) begin
      {cin, b, a} = v[2:0];
      #1;
      exp_total = int'(a) + int'(b) + int'(cin);
      checks++;
      if (int'({carry, sum}) != exp_total) begin
        failures++;
        $display("FAIL a=%0b b=%0b cin=%0b: carry,sum=%0b%0b, expected %0d",
                 a, b, cin, carry, sum, exp_total);
      end
      if (carry && a && b) carry_first++;
      if (carry && (a ^ b) && cin) carry_second++;
    end
    checks++;
    if (carry_first == 0 || carry_second == 0) begin
      failures++;
      $display("FAIL carry paths: first half adder %0d, second %0d", carry_first, carry_second);
    end
    $display("carry from first half adder %0d times, from second %0d times",
             carry_first, carry_second);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
