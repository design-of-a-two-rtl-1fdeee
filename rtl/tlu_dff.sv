// Positive clock-edge triggered D flip-flop built around the threshold-logic
// next-state network (tlu_dff_net), with its output Q fed back to the
// network's Qn input.
//
// The network's L input means "a rising clock edge happens now": with L = 1
// it returns D, with L = 0 it returns Qn. Evaluating the network at a falling
// edge (L = 0) therefore never changes the stored bit, so the flip-flop is one
// rising-edge register loaded with the network's output for L = 1 and the
// current Q. Between edges the register holds, which is what the network
// gives for L = 0. Feeding the clock level itself into L would make a
// transparent latch rather than an edge-triggered flip-flop.
//
// Interface: d is sampled at the rising edge of clk and appears on q right
// after it (one register stage). rst_n is an asynchronous active-low reset to
// q = 0; the reset is this design's addition, so that the counter built from
// these flip-flops starts from 0.
module tlu_dff (
  input  logic clk,
  input  logic rst_n,
  input  logic d,
  output logic q
);

  logic q_next;

  tlu_dff_net u_net (
    .d      (d),
    .l      (1'b1),
    .qn     (q),
    .q_next (q_next)
  );

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) q <= 1'b0;
    else        q <= q_next;
  end

endmodule
