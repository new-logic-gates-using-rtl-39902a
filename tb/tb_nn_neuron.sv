// tb_nn_neuron: self-checking test of the threshold neuron.
//
// Four neurons with different fan-in, weights, biases and firing rules are
// driven with every input combination. For each, the testbench recomputes
// the weighted sum from its own copy of the weights and checks both the sum
// and the firing decision. The parameter sets include sums that land exactly
// on a threshold, so "greater than" and "greater or equal" are told apart,
// as are both ends of a window. Purely combinational: inputs are applied and
// checked one time step later. A watchdog ends the run if it stalls.
module tb_nn_neuron;
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

  // A: 0.5, 0.4 and 0.1 against 0.9 -- the first two inputs give exactly the threshold.
  localparam int WA [4] = '{5, 4, 1, 0};
  // B: inverter-style "less than" with the sum hitting 1.0 = TH.
  localparam int WB [4] = '{10, 10, 0, 0};
  // C: window (0.6, 1.3) with bias 0.1 and a negative weight.
  localparam int WC [4] = '{6, 6, -3, 0};
  // D: four inputs, negative bias and weights, threshold -1.0.
  localparam int WD [4] = '{-20, 7, 15, 3};

  logic [2:0] xa;
  logic [1:0] xb;
  logic [2:0] xc;
  logic [3:0] xd;
  val_t va, vb, vc, vd;
  logic ya, yb, yc, yd;

  nn_neuron #(.N_IN(3), .W(WA), .B(0),  .ACT(ACT_GT),     .TH(9))              u_a (.x(xa), .val(va), .y(ya));
  nn_neuron #(.N_IN(2), .W(WB), .B(0),  .ACT(ACT_LT),     .TH(10))             u_b (.x(xb), .val(vb), .y(yb));
  nn_neuron #(.N_IN(3), .W(WC), .B(1),  .ACT(ACT_WINDOW), .TH(7), .TH_HI(13))  u_c (.x(xc), .val(vc), .y(yc));
  nn_neuron #(.N_IN(4), .W(WD), .B(-5), .ACT(ACT_GT),     .TH(-10))            u_d (.x(xd), .val(vd), .y(yd));

  // Reference: weighted sum in plain integers.
  function automatic int ref_sum(input int w[4], input int b, input int n, input logic [3:0] x);
    int s = b;
    for (int i = 0; i < n; i++) s += x[i] ? w[i] : 0;
    return s;
  endfunction

  task automatic check(input string name, input int got_v, input logic got_y,
                       input int exp_v, input logic exp_y);
    checks += 2;
    if (got_v != exp_v) begin
      failures++;
      $display("FAIL %s: value %0d, expected %0d", name, got_v, exp_v);
    end
    if (got_y !== exp_y) begin
      failures++;
      $display("FAIL %s: output %0b, expected %0b (value %0d)", name, got_y, exp_y, exp_v);
    end
  endtask

  int s;
  int fired_a, fired_b, fired_c, fired_d;

  initial begin
    fired_a = 0; fired_b = 0; fired_c = 0; fired_d = 0;
    xa = '0; xb = '0; xc = '0; xd = '0;
    for (int v = 0; v < 16; v++) begin
      xa = v[2:0]; xb = v[1:0]; xc = v[2:0]; xd = v[3:0];
      #1;
      s = ref_sum(WA, 0, 3, 4'(v[2:0]));
      check("A", int'(va), ya, s, s > 9);
      fired_a += int'(s > 9);
      s = ref_sum(WB, 0, 2, 4'(v[1:0]));
      check("B", int'(vb), yb, s, s < 10);
      fired_b += int'(s < 10);
      s = ref_sum(WC, 1, 3, 4'(v[2:0]));
      check("C", int'(vc), yc, s, (s > 7) && (s < 13));
      fired_c += int'((s > 7) && (s < 13));
      s = ref_sum(WD, -5, 4, 4'(v));
      check("D", int'(vd), yd, s, s > -10);
      fired_d += int'(s > -10);
    end
    // Spot checks worked out by hand.
    xa = 3'b011; xc = 3'b011; xd = 4'b1001; #1;
    check("A x=011 (0.9 is not > 0.9)", int'(va), ya, 9, 1'b0);
    check("C x=011 (1.3 is not < 1.3)", int'(vc), yc, 13, 1'b0);
    check("D x=1001 (-1.0 is not > -1.0)", int'(vd), yd, -22, 1'b0);
    xc = 3'b101; xd = 4'b0001; #1;
    check("C x=101 (0.4 is below the window)", int'(vc), yc, 4, 1'b0);
    check("D x=0001", int'(vd), yd, -25, 1'b0);
    xc = 3'b001; #1;
    check("C x=001 (0.7 is not > 0.7)", int'(vc), yc, 7, 1'b0);
    xc = 3'b111; #1;
    check("C x=111 (1.0 inside)", int'(vc), yc, 10, 1'b1);
    // Each neuron must have both fired and stayed quiet at least once.
    checks++;
    if (fired_a == 0 || fired_b == 0 || fired_c == 0 || fired_d == 0 ||
        fired_a == 16 || fired_b == 16 || fired_c == 16 || fired_d == 16) begin
      failures++;
      $display("FAIL: a neuron never changed its output");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
