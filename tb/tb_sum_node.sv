// Self-checking test of the linear summing node (sum_node).
//
// The default instance (weights 1, 1, -2 in tenths: 10, 10, -20) and an
// instance with four other weights are driven with every input pattern; the
// expected sums are worked out here from the test bench's own weight lists.
module tb_sum_node;
  import tlu_pkg::*;

  int checks = 0;
  int failures = 0;

  logic [2:0]        x0;
  logic signed [7:0] s0;
  sum_node u0 (.x(x0), .sum(s0));

  localparam weight_t [3:0] W1 = {8'sd25, -8'sd7, 8'sd1, -8'sd40};
  logic [3:0]         x1;
  logic signed [9:0]  s1;
  sum_node #(.N(4), .WEIGHTS(W1), .SUM_W(10)) u1 (.x(x1), .sum(s1));

  initial begin
    #100000;
    failures++;
    $display("FAIL watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int w0 [3] = '{10, 10, -20};
    int w1 [4] = '{-40, 1, -7, 25};
    int e;
    for (int v = 0; v < 16; v++) begin
      x0 = v[2:0]; x1 = v[3:0];
      #1;
      if (v < 8) begin
        e = 0;
        for (int i = 0; i < 3; i++) if (x0[i]) e += w0[i];
        checks++;
        if (int'(s0) != e) begin failures++; $display("FAIL default x=%b sum=%0d exp=%0d", x0, s0, e); end
      end
      e = 0;
      for (int i = 0; i < 4; i++) if (x1[i]) e += w1[i];
      checks++;
      if (int'(s1) != e) begin failures++; $display("FAIL n4 x=%b sum=%0d exp=%0d", x1, s1, e); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
