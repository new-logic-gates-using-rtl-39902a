// tb_nn_logic_top: end-to-end test of all neural logic circuits at their
// default (published) parameters.
//
// The top has twelve input bits in total (AND, OR, XOR and half adder take
// two each, NOT one, the full adder three). Every one of the 4096
// combinations is applied, and every output is compared with ordinary
// Boolean arithmetic. The test also counts how often each mechanism of the
// networks was exercised and fails if one never was:
//   and_reject   one AND input high: hidden sums of 0.5 stay below 0.9
//   or_accept    one OR input high: hidden sums of 0.5 exceed 0.4
//   not_invert   NOT output high: the output neuron fires below 0.5
//   xor_window   one XOR input high: 0.6 lies inside the (0, 1.1) window
//   xor_reject   both XOR inputs high: 1.2 lies above the window
//   ha_carry     the half adder's carry neuron exceeds 1.9
//   fa_carry1    full-adder carry produced by the first half adder
//   fa_carry2    full-adder carry produced by the second half adder
// Combinational: checked one time step after the inputs change. A watchdog
// ends the run if it stalls.
module tb_nn_logic_top;

  int checks = 0;
  int failures = 0;

  logic clk = 1'b0;
  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog: simulation did not finish");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  logic [1:0] and_x, or_x, xor_x, ha_x;
  logic       not_x, fa_a, fa_b, fa_cin;
  logic       and_y, or_y, not_y, xor_y, ha_sum, ha_carry, fa_sum, fa_carry;

  nn_logic_top dut (
    .and_x(and_x), .and_y(and_y),
    .or_x(or_x),   .or_y(or_y),
    .not_x(not_x), .not_y(not_y),
    .xor_x(xor_x), .xor_y(xor_y),
    .ha_x(ha_x),   .ha_sum(ha_sum), .ha_carry(ha_carry),
    .fa_a(fa_a), .fa_b(fa_b), .fa_cin(fa_cin), .fa_sum(fa_sum), .fa_carry(fa_carry)
  );

  typedef enum int {
    M_AND_REJECT, M_OR_ACCEPT, M_NOT_INVERT, M_XOR_WINDOW, M_XOR_REJECT,
    M_HA_CARRY, M_FA_CARRY1, M_FA_CARRY2, M_COUNT
  } mech_e;

  int mech [M_COUNT];
  string mech_name [M_COUNT] = '{"and_reject", "or_accept", "not_invert", "xor_window",
                                 "xor_reject", "ha_carry", "fa_carry1", "fa_carry2"};

  task automatic check_bit(input string what, input logic got, input logic exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %0b, expected %0b", what, got, exp);
    end
  endtask

  initial begin
    foreach (mech[i]) mech[i] = 0;
    {fa_cin, fa_b, fa_a, ha_x, xor_x, not_x, or_x, and_x} = '0;
    for (int v = 0; v < 4096; v++) begin
      {fa_cin, fa_b, fa_a, ha_x, xor_x, not_x, or_x, and_x} = v[11:0];
      #1;
      check_bit("and", and_y, and_x[0] & and_x[1]);
      check_bit("or",  or_y,  or_x[0] | or_x[1]);
      check_bit("not", not_y, ~not_x);
      check_bit("xor", xor_y, xor_x[0] ^ xor_x[1]);
      checks++;
      if (int'({ha_carry, ha_sum}) != int'(ha_x[0]) + int'(ha_x[1])) begin
        failures++;
        $display("FAIL half adder %0b: carry,sum = %0b%0b", ha_x, ha_carry, ha_sum);
      end
      checks++;
      if (int'({fa_carry, fa_sum}) != int'(fa_a) + int'(fa_b) + int'(fa_cin)) begin
        failures++;
        $display("FAIL full adder %0b%0b%0b: carry,sum = %0b%0b", fa_a, fa_b, fa_cin,
                 fa_carry, fa_sum);
      end
      if ((and_x == 2'b01 || and_x == 2'b10) && !and_y) mech[M_AND_REJECT]++;
      if ((or_x == 2'b01 || or_x == 2'b10) && or_y)      mech[M_OR_ACCEPT]++;
      if (!not_x && not_y)                              mech[M_NOT_INVERT]++;
      if ((xor_x == 2'b01 || xor_x == 2'b10) && xor_y)  mech[M_XOR_WINDOW]++;
      if (xor_x == 2'b11 && !xor_y)                     mech[M_XOR_REJECT]++;
      if (ha_carry)                                     mech[M_HA_CARRY]++;
      if (fa_carry && fa_a && fa_b)                     mech[M_FA_CARRY1]++;
      if (fa_carry && (fa_a ^ fa_b) && fa_cin)          mech[M_FA_CARRY2]++;
    end
    for (int i = 0; i < M_COUNT; i++) begin
      $display("mechanism %-11s exercised %0d times", mech_name[i], mech[i]);
      checks++;
      if (mech[i] == 0) begin
        failures++;
        $display("FAIL mechanism %s never exercised", mech_name[i]);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
