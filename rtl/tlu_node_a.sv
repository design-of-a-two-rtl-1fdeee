// Node A of the D flip-flop network: the threshold node trained for D = 1.
//
// Weights D 0.4, L 0.2, Qn 0.3, threshold 0.5, found by the perceptron
// learning rule (rate 0.1, zero initial weights) on the next-state table of a
// D flip-flop with D held at 1. With D = 1 the output is L or Qn: set on a
// clock edge (L = 1), otherwise hold. With D = 0 the largest sum is 0.5, so
// the output is 0. Combinational.
module tlu_node_a
  import tlu_pkg::*;
(
  input  logic d,
  input  logic l,
  input  logic qn,
  output logic y
);

  tlu #(
    .N         (3),
    .WEIGHTS   ({NODEA_WQ, NODEA_WL, NODEA_WD}),
    .THRESHOLD (NODEA_T)
  ) u_node (
    .x       ({qn, l, d}),
    .y       (y),
    .decided ()
  );

endmodule
