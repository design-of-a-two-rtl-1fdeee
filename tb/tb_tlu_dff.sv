// Self-checking test of the threshold-logic D flip-flop (tlu_dff).
//
// A 200-unit clock (high and low for 100 each, as in the original
// simulation) drives the flip-flop. D is changed at falling edges, sometimes
// randomly and sometimes held, and the output is compared after each edge
// with a reference that simply stores D at every rising edge. The test also
// checks that a falling edge never changes Q, that D changing while the clock
// is high or low does not reach Q before the next rising edge, that the first
// edge after reset loads D with one cycle of latency, and that rst_n clears Q
// asynchronously, in the middle of a clock phase.
module tb_tlu_dff;
  int checks = 0;
  int failures = 0;
  int cycles = 0;

  logic clk = 1'b0;
  logic rst_n = 1'b1;
  logic d = 1'b0;
  logic q;
  logic q_ref;

  tlu_dff dut (.clk(clk), .rst_n(rst_n), .d(d), .q(q));

  always #100 clk = ~clk;

  task automatic check(input string what, input logic got, input logic exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL cycle %0d %s: q=%b expected %b", cycles, what, got, exp);
    end
  endtask

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("FAIL watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic q_before;
    #1;
    rst_n = 1'b0;
    #1;
    check("in reset", q, 1'b0);
    @(negedge clk);
    rst_n = 1'b1;
    d = 1'b1;
    q_ref = 1'b0;
    for (int i = 0; i < 400; i++) begin
      @(posedge clk);
      cycles++;
      q_ref = d;
      #1;
      check("after rising edge", q, q_ref);
      // D changes while the clock is high: Q must not follow.
      if (i % 5 == 2) begin
        d = ~d;
        #1;
        check("D changed, clock high", q, q_ref);
      end
      q_before = q;
      @(negedge clk);
      #1;
      check("falling edge holds", q, q_before);
      if (i % 3 != 0) d = 1'($urandom);
      #10;
      check("D changed, clock low", q, q_ref);
      if (i == 200) begin
        // Asynchronous reset in the low phase, released q_before the next edge.
        q_ref = 1'b0;
        rst_n = 1'b0;
        #5;
        check("asynchronous reset", q, 1'b0);
        rst_n = 1'b1;
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
