// Threshold logic unit (a McCulloch-Pitts neuron with binary inputs).
//
// y is 1 when the weighted sum of the inputs, sum(WEIGHTS[i] * x[i]), is
// strictly greater than THRESHOLD, and 0 when it is less than or equal to it.
// WEIGHTS[i] multiplies x[i], so a concatenation {w_(N-1), ..., w_0} lists
// the weights in the same order as {x[N-1], ..., x[0]}. Weights and threshold are signed integers in
// tenths (see tlu_pkg).
//
// The linear threshold function this unit models also allows for defect
// tolerances: it is only required to give 1 above THRESHOLD + DELTA_ON and 0
// at or below THRESHOLD - DELTA_OFF. 'decided' is 1 when the sum lies outside
// that band, i.e. when the decision has at least the requested margin. The
// tolerance values are not given with the model, so both default to 0, where
// 'decided' is always 1; y always uses the bare threshold.
//
// There is no bias term (it is taken as 0 throughout). The gates built from
// this unit use the bare threshold and leave 'decided' unconnected.
//
// Purely combinational, no clock. The defaults (two inputs, 0.3/0.3,
// threshold 0.5) are the trained AND gate.
module tlu
  import tlu_pkg::*;
#(
  parameter int                  N         = 2,
  parameter weight_t [N-1:0]     WEIGHTS   = {AND2_W1, AND2_W0},
  parameter weight_t             THRESHOLD = AND2_T,
  parameter weight_t             DELTA_ON  = '0,
  parameter weight_t             DELTA_OFF = '0
) (
  input  logic [N-1:0] x,
  output logic         y,
  output logic         decided
);

  int sum;

  always_comb begin
    sum = 0;
    for (int i = 0; i < N; i++) begin
      if (x[i]) sum = sum + int'(WEIGHTS[i]);
    end
  end

  assign y       = (sum > int'(THRESHOLD));
  assign decided = (sum > int'(THRESHOLD) + int'(DELTA_ON)) ||
                   (sum <= int'(THRESHOLD) - int'(DELTA_OFF));

endmodule
