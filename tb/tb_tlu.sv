// Self-checking test of the generic threshold unit (tlu).
//
// Four instances with different sizes, weights, thresholds and tolerance
// bands are driven with every input pattern. The expected y and decided are
// worked out here from the weight lists held in the test bench itself: y is 1
// when the weighted sum is strictly above the threshold, decided is 1 when the
// sum is above T + delta_on or at most T - delta_off. The default instance is
// the two-input AND gate and is also checked against the AND truth table.
module tb_tlu;
  import tlu_pkg::*;

  int checks = 0;
  int failures = 0;

  // Default instance: AND gate (0.3, 0.3, threshold 0.5).
  logic [1:0] x0;
  logic       y0, d0;
  tlu u0 (.x(x0), .y(y0), .decided(d0));

  // Three inputs with a negative weight.
  localparam weight_t [2:0] W1 = {8'sd6, -8'sd1, 8'sd4};
  logic [2:0] x1;
  logic       y1, d1;
  tlu #(.N(3), .WEIGHTS(W1), .THRESHOLD(8'sd5)) u1 (.x(x1), .y(y1), .decided(d1));

  // AND weights with a tolerance band of 0.1 on both sides.
  localparam weight_t [1:0] W2 = {8'sd3, 8'sd3};
  logic [1:0] x2;
  logic       y2, d2;
  tlu #(.N(2), .WEIGHTS(W2), .THRESHOLD(8'sd5), .DELTA_ON(8'sd1), .DELTA_OFF(8'sd1))
    u2 (.x(x2), .y(y2), .decided(d2));

  // Four inputs, negative threshold, wider asymmetric band.
  localparam weight_t [3:0] W3 = {-8'sd5, 8'sd2, 8'sd7, -8'sd3};
  logic [3:0] x3;
  logic       y3, d3;
  tlu #(.N(4), .WEIGHTS(W3), .THRESHOLD(-8'sd2), .DELTA_ON(8'sd2), .DELTA_OFF(8'sd3))
    u3 (.x(x3), .y(y3), .decided(d3));

  function automatic int wsum(input int n, input logic [3:0] x, input int w [4]);
    int s = 0;
    for (int i = 0; i < n; i++) if (x[i]) s += w[i];
    return s;
  endfunction

  task automatic check(input string what, input logic got, input logic exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %b expected %b", what, got, exp);
    end
  endtask

  initial begin
    #100000;
    failures++;
    $display("FAIL watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int w1 [4] = '{4, -1, 6, 0};
    int w2 [4] = '{3, 3, 0, 0};
    int w3 [4] = '{-3, 7, 2, -5};
    int s;
    for (int v = 0; v < 16; v++) begin
      x0 = v[1:0]; x1 = v[2:0]; x2 = v[1:0]; x3 = v[3:0];
      #1;
      if (v < 4) begin
        check($sformatf("and y x=%b", x0), y0, x0[0] & x0[1]);
        check($sformatf("and decided x=%b", x0), d0, 1'b1);
        s = wsum(2, 4'(x2), w2);
        check($sformatf("band y x=%b", x2), y2, s > 5);
        check($sformatf("band decided x=%b", x2), d2, (s > 6) || (s <= 4));
      end
      if (v < 8) begin
        s = wsum(3, 4'(x1), w1);
        check($sformatf("n3 y x=%b", x1), y1, s > 5);
        check($sformatf("n3 decided x=%b", x1), d1, 1'b1);
      end
      s = wsum(4, x3, w3);
      check($sformatf("n4 y x=%b", x3), y3, s > -2);
      check($sformatf("n4 decided x=%b", x3), d3, (s > 0) || (s <= -5));
    end
    // The AND weights leave no 0.1 margin at the sum 0.6: not decided.
    x2 = 2'b11; #1;
    check("band: 0.6 is inside (0.4, 0.6]", d2, 1'b0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
