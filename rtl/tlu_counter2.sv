// Two-bit up-counter built from threshold logic: it counts 0, 1, 2, 3, 0, ...
// one step per rising edge of clk.
//
// Two threshold-logic T flip-flops (tlu_tff) have their T inputs tied to 1.
// The first is clocked by clk and is bit 0. Its output also passes through a
// threshold-logic inverter (weight -0.5, threshold -0.5, tlu_not) that clocks
// the second flip-flop, bit 1. Bit 1 therefore toggles when bit 0 falls from
// 1 to 0, i.e. at the carry: a ripple counter, as in the original
// threshold-logic counter.
//
// Timing: q[0] changes one register delay after the rising edge of clk, and
// q[1] one inverter and one register delay after q[0]. Within a cycle both
// have settled long before the next edge, but q[1] is driven by a clock
// derived from q[0], not by clk: the second flip-flop sits in its own clock
// domain, which is what the ripple structure means. Code that samples q with
// clk must allow for that delay (sampling at the falling edge, as the test
// bench does, is safe). rst_n is an asynchronous active-low reset of both
// flip-flops to count 0 (this design's addition).
module tlu_counter2 (
  input  logic       clk,
  input  logic       rst_n,
  output logic [1:0] q
);

  logic q0_n;

  tlu_tff u_bit0 (.clk(clk),  .rst_n(rst_n), .t(1'b1), .q(q[0]));
  tlu_not u_inv  (.a(q[0]),   .y(q0_n));
  tlu_tff u_bit1 (.clk(q0_n), .rst_n(rst_n), .t(1'b1), .q(q[1]));

endmodule
