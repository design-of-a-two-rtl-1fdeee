// Next-state network of the threshold-logic D flip-flop (six threshold nodes,
// two layers after the input nodes).
//
//   A = node trained for D = 1   (D 0.4, L 0.2, Qn 0.3 > 0.5)  = L | Qn  if D
//   B = node trained for D = 0   (L -0.1, Qn 0.6 > 0.5)        = Qn & ~L
//   C = NOT D                    (-0.5 > -0.5)
//   D-node = AND(A, D)           (0.3, 0.3 > 0.5)
//   E-node = AND(C, B)           (0.3, 0.3 > 0.5)
//   F = OR(D-node, E-node)       (0.6, 0.6 > 0.5)               -> q_next
//
// Node A alone is only correct when D = 1 and node B only when D = 0, so the
// D input selects between them through the AND/OR layer. The result is
// q_next = l ? d : qn: load D when the clock input L is 1, hold Qn when it
// is 0. The node structure and all weights are those of the original network; it is
// purely combinational (the storage and the feedback of Q to Qn are in
// tlu_dff).
module tlu_dff_net (
  input  logic d,
  input  logic l,
  input  logic qn,
  output logic q_next
);

  logic node_a, node_b, node_c, node_d, node_e;

  tlu_node_a u_a (.d(d), .l(l), .qn(qn), .y(node_a));
  tlu_node_b u_b (.l(l), .qn(qn), .y(node_b));
  tlu_not    u_c (.a(d), .y(node_c));
  tlu_and2   u_d (.a(node_a), .b(d),      .y(node_d));
  tlu_and2   u_e (.a(node_c), .b(node_b), .y(node_e));
  tlu_or2    u_f (.a(node_d), .b(node_e), .y(q_next));

endmodule
