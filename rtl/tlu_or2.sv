// Two-input OR gate as a single threshold node (node F of the D flip-flop
// network).
//
// Weights 0.6 on a and on b, threshold 0.5: either input alone already
// exceeds the threshold. Combinational.
module tlu_or2
  import tlu_pkg::*;
(
  input  logic a,
  input  logic b,
  output logic y
);

  tlu #(
    .N         (2),
    .WEIGHTS   ({OR2_W1, OR2_W0}),
    .THRESHOLD (OR2_T)
  ) u_node (
    .x       ({b, a}),
    .y       (y),
    .decided ()
  );

endmodule
