// Shared constants of the threshold-logic gates, flip-flops and counter.
//
// Every weight and threshold is a signed integer in tenths (WEIGHT_SCALE = 10),
// so 0.3 is written 3 and -0.5 is written -5. The trained values below are
// the ones the perceptron learning rule produces for each node (see
// tb_perceptron_learning) and that the original node diagrams show.
// Representing them in tenths is this design's choice: all of them are exact
// multiples of 0.1, so integer arithmetic gives exactly the same decisions as
// real arithmetic.
package tlu_pkg;

  localparam int WEIGHT_SCALE = 10;

  // A weight or threshold: signed, in tenths, range -12.8 .. +12.7.
  localparam int WEIGHT_W = 8;
  typedef logic signed [WEIGHT_W-1:0] weight_t;

  // Two-input AND gate: 0.3, 0.3, threshold 0.5 (also nodes D and E of the
  // D flip-flop network and the hidden node of the XOR).
  localparam weight_t AND2_W0 = 3;
  localparam weight_t AND2_W1 = 3;
  localparam weight_t AND2_T = 5;

  // Two-input OR gate (node F): 0.6, 0.6, threshold 0.5.
  localparam weight_t OR2_W0 = 6;
  localparam weight_t OR2_W1 = 6;
  localparam weight_t OR2_T = 5;

  // Inverter (node C and the counter's clock inverter): -0.5, threshold -0.5.
  localparam weight_t NOT_W = -5;
  localparam weight_t NOT_T = -5;

  // Node A, trained with D = 1: D 0.4, L 0.2, Qn 0.3, threshold 0.5.
  localparam weight_t NODEA_WD = 4;
  localparam weight_t NODEA_WL = 2;
  localparam weight_t NODEA_WQ = 3;
  localparam weight_t NODEA_T = 5;

  // Node B, trained with D = 0: L -0.1, Qn 0.6, threshold 0.5.
  localparam weight_t NODEB_WL = -1;
  localparam weight_t NODEB_WQ = 6;
  localparam weight_t NODEB_T = 5;

  // Output node of the XOR: A 1, B 1, hidden AND -2 (no threshold).
  localparam weight_t XOR_WA = weight_t'(1 * WEIGHT_SCALE);
  localparam weight_t XOR_WB = weight_t'(1 * WEIGHT_SCALE);
  localparam weight_t XOR_WH = weight_t'(-2 * WEIGHT_SCALE);

endpackage
