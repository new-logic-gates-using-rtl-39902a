// tb_nn_topology: self-checking test of the 2-2-2-1 network wiring.
//
// Three instances are driven with all four input pairs:
//   u_def  default parameters (all weights 1.0, thresholds 0.9), which make
//          every hidden neuron and the output an OR of the inputs;
//   u_asym distinct weights on every edge, so that a weight on the wrong edge
//          or a crossed connection changes a weighted sum;
//   u_win  the same distinct weights with a window output neuron.
// For each, the testbench recomputes every neuron's weighted sum and output
// layer by layer from its own copy of the equations
//   NOD1 = x1*w1, NOD2 = x2*w2, NOD3 = NOD1*w3 + NOD2*w6,
//   NOD4 = NOD1*w5 + NOD2*w4, y = NOD3*w7 + NOD4*w8
// and compares all of them. Combinational: checked one time step after the
// inputs change. A watchdog ends the run if it stalls.
module tb_nn_topology;
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

  typedef struct {
    int w[1:8];
    int th[1:5];
    int th_hi;
    act_e act;
  } net_cfg_t;

  localparam net_cfg_t DEF  = '{w: '{10, 10, 10, 10, 10, 10, 10, 10}, th: '{9, 9, 9, 9, 9},
                                th_hi: 11, act: ACT_GT};
  // Hidden layer: NOD3 = 0.5*NOD1 + 0.3*NOD2 > 0.4 and NOD4 = 0.2*NOD1 + 0.7*NOD2 > 0.4,
  // so NOD3 follows NOD1 and NOD4 follows NOD2. Output: 0.3*NOD3 + 0.8*NOD4.
  localparam net_cfg_t ASYM = '{w: '{12, 11, 5, 7, 2, 3, 3, 8}, th: '{9, 10, 4, 4, 2},
                                th_hi: 11, act: ACT_GT};
  localparam net_cfg_t WIN  = '{w: '{12, 11, 5, 7, 2, 3, 3, 8}, th: '{9, 10, 4, 4, 5},
                                th_hi: 11, act: ACT_WINDOW};

  logic x1, x2;
  logic       y   [3];
  logic [3:0] nod [3];
  val_t       nv  [3][4];
  val_t       yv  [3];

  nn_topology u_def (.x1(x1), .x2(x2), .y(y[0]), .nod_o(nod[0]), .nod_val(nv[0]), .y_val(yv[0]));

  nn_topology #(
    .W1(ASYM.w[1]), .W2(ASYM.w[2]), .W3(ASYM.w[3]), .W4(ASYM.w[4]),
    .W5(ASYM.w[5]), .W6(ASYM.w[6]), .W7(ASYM.w[7]), .W8(ASYM.w[8]),
    .TH1(ASYM.th[1]), .TH2(ASYM.th[2]), .TH3(ASYM.th[3]), .TH4(ASYM.th[4]), .TH5(ASYM.th[5]),
    .TH5_HI(ASYM.th_hi), .OUT_ACT(ASYM.act)
  ) u_asym (.x1(x1), .x2(x2), .y(y[1]), .nod_o(nod[1]), .nod_val(nv[1]), .y_val(yv[1]));

  nn_topology #(
    .W1(WIN.w[1]), .W2(WIN.w[2]), .W3(WIN.w[3]), .W4(WIN.w[4]),
    .W5(WIN.w[5]), .W6(WIN.w[6]), .W7(WIN.w[7]), .W8(WIN.w[8]),
    .TH1(WIN.th[1]), .TH2(WIN.th[2]), .TH3(WIN.th[3]), .TH4(WIN.th[4]), .TH5(WIN.th[5]),
    .TH5_HI(WIN.th_hi), .OUT_ACT(WIN.act)
  ) u_win (.x1(x1), .x2(x2), .y(y[2]), .nod_o(nod[2]), .nod_val(nv[2]), .y_val(yv[2]));

  task automatic check_int(input string what, input int got, input int exp);
    checks++;
    if (got != exp) begin
      failures++;
      $display("FAIL %s: got %0d, expected %0d (x1=%0b x2=%0b)", what, got, exp, x1, x2);
    end
  endtask

  function automatic logic fire(input int v, input int th, input int th_hi, input act_e act);
    case (act)
      ACT_GT:  return v > th;
      ACT_LT:  return v < th;
      default: return (v > th) && (v < th_hi);
    endcase
  endfunction

  task automatic check_net(input int k, input net_cfg_t c);
    int v1, v2, v3, v4, vy;
    logic n1, n2, n3, n4, ey;
    v1 = x1 ? c.w[1] : 0;                       n1 = v1 > c.th[1];
    v2 = x2 ? c.w[2] : 0;                       n2 = v2 > c.th[2];
    v3 = (n1 ? c.w[3] : 0) + (n2 ? c.w[6] : 0); n3 = v3 > c.th[3];
    v4 = (n1 ? c.w[5] : 0) + (n2 ? c.w[4] : 0); n4 = v4 > c.th[4];
    vy = (n3 ? c.w[7] : 0) + (n4 ? c.w[8] : 0); ey = fire(vy, c.th[5], c.th_hi, c.act);
    check_int($sformatf("net%0d NOD1 value", k), int'(nv[k][0]), v1);
    check_int($sformatf("net%0d NOD2 value", k), int'(nv[k][1]), v2);
    check_int($sformatf("net%0d NOD3 value", k), int'(nv[k][2]), v3);
    check_int($sformatf("net%0d NOD4 value", k), int'(nv[k][3]), v4);
    check_int($sformatf("net%0d node outputs", k), int'(nod[k]), int'({n4, n3, n2, n1}));
    check_int($sformatf("net%0d y value", k), int'(yv[k]), vy);
    check_int($sformatf("net%0d y", k), int'(y[k]), int'(ey));
  endtask

  initial begin
    x1 = 1'b0; x2 = 1'b0;
    for (int v = 0; v < 4; v++) begin
      {x2, x1} = v[1:0];
      #1;
      check_net(0, DEF);
      check_net(1, ASYM);
      check_net(2, WIN);
    end
    // Hand-worked values for the asymmetric network, x1 = 1, x2 = 0:
    // NOD3 = 0.5 -> 1, NOD4 = 0.2 -> 0, y = 0.3 -> 1 (above 0.2), window (0.5,1.1) -> 0.
    x1 = 1'b1; x2 = 1'b0; #1;
    check_int("asym hand y value", int'(yv[1]), 3);
    check_int("asym hand y", int'(y[1]), 1);
    check_int("win hand y", int'(y[2]), 0);
    // x1 = 0, x2 = 1: NOD3 = 0.3 -> 0, NOD4 = 0.7 -> 1, y = 0.8 -> window fires.
    x1 = 1'b0; x2 = 1'b1; #1;
    check_int("asym hand nodes", int'(nod[1]), 32'b1010);
    check_int("win hand y value", int'(yv[2]), 8);
    check_int("win hand y", int'(y[2]), 1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
