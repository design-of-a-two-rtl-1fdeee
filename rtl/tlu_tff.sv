// Positive clock-edge triggered T flip-flop in threshold logic.
//
// The threshold-logic XOR (tlu_xor2) of the toggle input t and the stored
// bit q drives the data input of the threshold-logic D flip-flop (tlu_dff),
// so at each rising edge of clk the output toggles when t = 1 and holds when
// t = 0. Interface and timing are those of tlu_dff: t is sampled at the rising
// edge, q changes right after it; rst_n is an asynchronous active-low reset to
// 0 (this design's addition).
module tlu_tff (
  input  logic clk,
  input  logic rst_n,
  input  logic t,
  output logic q
);

  logic d_in;

  tlu_xor2 u_xor (.a(t), .b(q), .y(d_in));
  tlu_dff  u_dff (.clk(clk), .rst_n(rst_n), .d(d_in), .q(q));

endmodule
