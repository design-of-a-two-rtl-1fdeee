// Inverter as a single threshold node (node C of the D flip-flop network, and
// the clock inverter between the two stages of the counter).
//
// Weight -0.5, threshold -0.5: input 0 gives the sum 0, which exceeds -0.5,
// so y = 1; input 1 gives -0.5, which does not, so y = 0. Combinational.
module tlu_not
  import tlu_pkg::*;
(
  input  logic a,
  output logic y
);

  tlu #(
    .N         (1),
    .WEIGHTS   (NOT_W),
    .THRESHOLD (NOT_T)
  ) u_node (
    .x       (a),
    .y       (y),
    .decided ()
  );

endmodule
