// Two-input AND gate as a single threshold node.
//
// Weights 0.3 on a and on b, threshold 0.5: the sum 0.6 exceeds the threshold
// only when both inputs are 1 (0.3 alone does not). These are the weights the
// perceptron learning rule finds for the AND function with a learning rate of
// 0.1 and zero initial weights. Combinational.
module tlu_and2
  import tlu_pkg::*;
(
  input  logic a,
  input  logic b,
  output logic y
);

  tlu #(
    .N         (2),
    .WEIGHTS   ({AND2_W1, AND2_W0}),
    .THRESHOLD (AND2_T)
  ) u_node (
    .x       ({b, a}),
    .y       (y),
    .decided ()
  );

endmodule
