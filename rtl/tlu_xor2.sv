// Two-input XOR in threshold logic.
//
// XOR is not linearly separable, so one threshold node cannot compute it; a
// second layer is needed. A hidden AND node (0.3, 0.3, threshold 0.5) detects
// "both inputs 1", and a linear summing node adds A + B - 2 * AND:
//   (0,0) -> 0, (0,1) -> 1, (1,0) -> 1, (1,1) -> 1 + 1 - 2 = 0.
// The sum only ever takes the values 0 and 1, and y is 1 when it is 1; an
// assertion checks that no other value occurs. The two-layer structure and
// its weights are those of the original threshold-logic XOR; comparing the
// sum with 1 is this implementation's way of turning the summing node's value
// into a bit. Combinational.
module tlu_xor2
  import tlu_pkg::*;
(
  input  logic a,
  input  logic b,
  output logic y
);

  localparam int SUM_W = 8;

  logic                    hidden;
  logic signed [SUM_W-1:0] sum;

  tlu_and2 u_hidden (.a(a), .b(b), .y(hidden));

  sum_node #(
    .N       (3),
    .WEIGHTS ({XOR_WH, XOR_WB, XOR_WA}),
    .SUM_W   (SUM_W)
  ) u_out (
    .x   ({hidden, b, a}),
    .sum (sum)
  );

  assign y = (sum == SUM_W'(WEIGHT_SCALE));

  always_comb begin
    assert (sum == '0 || sum == SUM_W'(WEIGHT_SCALE))
      else $error("tlu_xor2: summing node gave %0d tenths", sum);
  end

endmodule
