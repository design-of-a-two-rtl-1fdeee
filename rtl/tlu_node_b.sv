// Node B of the D flip-flop network: the threshold node trained for D = 0.
//
// Weights L -0.1, Qn 0.6, threshold 0.5, found by the perceptron learning
// rule (rate 0.1, zero initial weights) on the next-state table of a D
// flip-flop with D held at 0. The output is Qn and not L: cleared on a clock
// edge (L = 1), otherwise hold. Combinational.
module tlu_node_b
  import tlu_pkg::*;
(
  input  logic l,
  input  logic qn,
  output logic y
);

  tlu #(
    .N         (2),
    .WEIGHTS   ({NODEB_WQ, NODEB_WL}),
    .THRESHOLD (NODEB_T)
  ) u_node (
    .x       ({qn, l}),
    .y       (y),
    .decided ()
  );

endmodule
