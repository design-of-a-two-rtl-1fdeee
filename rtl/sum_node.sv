// Linear summing node: the weighted sum of binary inputs, with no threshold.
//
// sum = sum(WEIGHTS[i] * x[i]) (WEIGHTS[i] multiplies x[i]) as a signed SUM_W-bit number, in the same
// tenths as the threshold units (tlu_pkg). It is the output stage of the
// two-layer XOR (tlu_xor2), whose weights 1, 1 and -2 are the defaults here.
// The sum width is this design's choice. Combinational.
module sum_node
  import tlu_pkg::*;
#(
  parameter int              N       = 3,
  parameter weight_t [N-1:0] WEIGHTS = {XOR_WH, XOR_WB, XOR_WA},
  parameter int              SUM_W   = 8
) (
  input  logic [N-1:0]              x,
  output logic signed [SUM_W-1:0]   sum
);

  int acc;

  always_comb begin
    acc = 0;
    for (int i = 0; i < N; i++) begin
      if (x[i]) acc = acc + int'(WEIGHTS[i]);
    end
  end

  assign sum = SUM_W'(acc);

endmodule
