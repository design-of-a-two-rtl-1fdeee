// Replays the perceptron learning rule that chose the weights of the
// threshold nodes, and checks that it lands on the weights the RTL uses.
//
// Rule (Rosenblatt): for each training sample j, y_j = (sum w_i x_ji > T),
// then w_i += r * (d_j - y_j) * x_ji. Weights start at 0, the threshold T is
// 0.5 and the learning rate r is 0.1; everything is in tenths, so r * (d - y)
// is -1, 0 or +1 tenth. Passes over the training set repeat until one pass
// makes no error. Three trainings are replayed, each with its samples in
// the order of the original training tables:
//   AND gate  inputs (a, b), a held at 1: samples b = 0 -> 0, b = 1 -> 1.
//             Expect 0.3, 0.3 after 4 passes (the last one error-free).
//   node A    inputs (D, L, Qn), D held at 1, (L, Qn) = 00, 01, 10, 11 ->
//             next state 0, 1, 1, 1. Expect 0.4, 0.2, 0.3 after 3 passes.
//   node B    inputs (D, L, Qn), D held at 0, same order -> 0, 1, 0, 0.
//             Expect 0 (D never active), -0.1, 0.6.
// The learned weights are compared with the constants in tlu_pkg, and the
// trained nodes with the truth tables they were trained on.
module tb_perceptron_learning;
  import tlu_pkg::*;

  localparam int R_STEP    = 1;   // learning rate 0.1, in tenths
  localparam int T_TENTHS  = 5;   // threshold 0.5
  localparam int MAX_PASS  = 100;

  int checks = 0;
  int failures = 0;

  typedef struct {
    int         n_in;
    int         n_samp;
    logic [2:0] x [4];
    logic       d [4];
  } train_set_t;

  task automatic expect_eq(input string what, input int got, input int exp);
    checks++;
    if (got != exp) begin
      failures++;
      $display("FAIL %s: got %0d expected %0d", what, got, exp);
    end
  endtask

  function automatic logic fire(input int n, input int w [3], input logic [2:0] x);
    int s = 0;
    for (int i = 0; i < n; i++) if (x[i]) s += w[i];
    return s > T_TENTHS;
  endfunction

  // Runs the rule; returns the weights and the number of passes made.
  task automatic train(input train_set_t ts, output int w [3], output int passes);
    int errors;
    logic y;
    w = '{0, 0, 0};
    passes = 0;
    do begin
      errors = 0;
      for (int j = 0; j < ts.n_samp; j++) begin
        y = fire(ts.n_in, w, ts.x[j]);
        if (y != ts.d[j]) begin
          errors++;
          for (int i = 0; i < ts.n_in; i++)
            if (ts.x[j][i]) w[i] += (ts.d[j] ? R_STEP : -R_STEP);
        end
      end
      passes++;
    end while (errors != 0 && passes < MAX_PASS);
  endtask

  task automatic check_trained(input string name, input train_set_t ts, input int w [3]);
    for (int j = 0; j < ts.n_samp; j++) begin
      checks++;
      if (fire(ts.n_in, w, ts.x[j]) != ts.d[j]) begin
        failures++;
        $display("FAIL %s misclassifies sample %0d", name, j);
      end
    end
  endtask

  initial begin
    #100000;
    failures++;
    $display("FAIL watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    train_set_t ts;
    int w [3];
    int passes;

    // AND gate: x = {-, b, a}.
    ts.n_in = 2; ts.n_samp = 2;
    ts.x[0] = 3'b001; ts.d[0] = 1'b0;
    ts.x[1] = 3'b011; ts.d[1] = 1'b1;
    train(ts, w, passes);
    $display("AND:    w = %0d/10, %0d/10 after %0d passes", w[0], w[1], passes);
    expect_eq("AND passes", passes, 4);
    expect_eq("AND w_a", w[0], int'(AND2_W0));
    expect_eq("AND w_b", w[1], int'(AND2_W1));
    check_trained("AND", ts, w);

    // Node A: x = {Qn, L, D}, D = 1.
    ts.n_in = 3; ts.n_samp = 4;
    ts.x[0] = 3'b001; ts.d[0] = 1'b0;
    ts.x[1] = 3'b101; ts.d[1] = 1'b1;
    ts.x[2] = 3'b011; ts.d[2] = 1'b1;
    ts.x[3] = 3'b111; ts.d[3] = 1'b1;
    train(ts, w, passes);
    $display("node A: w = %0d/10, %0d/10, %0d/10 after %0d passes", w[0], w[1], w[2], passes);
    expect_eq("node A passes", passes, 3);
    expect_eq("node A w_D",  w[0], int'(NODEA_WD));
    expect_eq("node A w_L",  w[1], int'(NODEA_WL));
    expect_eq("node A w_Qn", w[2], int'(NODEA_WQ));
    check_trained("node A", ts, w);

    // Node B: x = {Qn, L, D}, D = 0.
    ts.x[0] = 3'b000; ts.d[0] = 1'b0;
    ts.x[1] = 3'b100; ts.d[1] = 1'b1;
    ts.x[2] = 3'b010; ts.d[2] = 1'b0;
    ts.x[3] = 3'b110; ts.d[3] = 1'b0;
    train(ts, w, passes);
    $display("node B: w = %0d/10, %0d/10, %0d/10 after %0d passes", w[0], w[1], w[2], passes);
    expect_eq("node B w_D",  w[0], 0);
    expect_eq("node B w_L",  w[1], int'(NODEB_WL));
    expect_eq("node B w_Qn", w[2], int'(NODEB_WQ));
    check_trained("node B", ts, w);
    checks++;
    if (passes >= MAX_PASS) begin failures++; $display("FAIL node B did not converge"); end

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
