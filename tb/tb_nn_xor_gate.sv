// tb_nn_xor_gate: checks the neural XOR gate against the published
// layer-by-layer tables: for every input pair, the weighted sums and outputs
// of the input neurons, the hidden neurons and the window output neuron
// (0.6 accepted, 1.2 rejected), and the final output against x1 ^ x2.
// Combinational: checked one time step after the inputs change. A watchdog
// ends the run if it stalls.
module tb_nn_xor_gate;
  import nn_pkg::*;

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

  // One row per input combination, values in units of 0.1:
  //   x1 x2 | val NOD1 NOD2 | out NOD1 NOD2 | val NOD3 NOD4 | out NOD3 NOD4 | val y | y
  localparam int TBL [4][12] = '{
    '{0, 0,   0,  0,  0, 0,   0,  0,  0, 0,   0, 0},
    '{0, 1,   0, 10,  0, 1,   5,  5,  0, 1,   6, 1},
    '{1, 0,  10,  0,  1, 0,   5,  5,  0, 1,   6, 1},
    '{1, 1,  10, 10,  1, 1,  10, 10,  1, 1,  12, 0}
  };

  logic x1, x2, y;
  logic [3:0] nod;
  val_t nv [4];
  val_t yv;

  nn_xor_gate dut (.x1(x1), .x2(x2), .y(y), .nod_o(nod), .nod_val(nv), .y_val(yv));

  task automatic check_int(input string what, input int got, input int exp);
    checks++;
    if (got != exp) begin
      failures++;
      $display("FAIL %s: got %0d, expected %0d (x1=%0b x2=%0b)", what, got, exp, x1, x2);
    end
  endtask

  initial begin
    x1 = 1'b0; x2 = 1'b0;
    for (int r = 0; r < 4; r++) begin
      x1 = TBL[r][0][0];
      x2 = TBL[r][1][0];
      #1;
      check_int("NOD1 value",  int'(nv[0]), TBL[r][2]);
      check_int("NOD2 value",  int'(nv[1]), TBL[r][3]);
      check_int("NOD1 output", int'(nod[0]), TBL[r][4]);
      check_int("NOD2 output", int'(nod[1]), TBL[r][5]);
      check_int("NOD3 value",  int'(nv[2]), TBL[r][6]);
      check_int("NOD4 value",  int'(nv[3]), TBL[r][7]);
      check_int("NOD3 output", int'(nod[2]), TBL[r][8]);
      check_int("NOD4 output", int'(nod[3]), TBL[r][9]);
      check_int("y value",     int'(yv), TBL[r][10]);
      check_int("y",           int'(y), TBL[r][11]);
      check_int("y against x1 ^ x2", int'(y), int'(logic'(x1 ^ x2)));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
