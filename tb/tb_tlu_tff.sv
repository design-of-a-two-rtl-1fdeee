// Self-checking test of the threshold-logic T flip-flop (tlu_tff).
//
// A 200-unit clock drives the flip-flop. T starts at 0 (the output must hold
// at 0), then follows a pattern of long runs of 1 (the output must toggle on
// every rising edge, so it has half the clock frequency) and random values.
// The reference flips a stored bit at each rising edge where T is 1. The test
// also checks that falling edges change nothing and counts how often the
// output toggled and held.
module tb_tlu_tff;
  int checks = 0;
  int failures = 0;
  int cycles = 0;
  int toggles = 0;
  int holds = 0;

  logic clk = 1'b0;
  logic rst_n = 1'b1;
  logic t = 1'b0;
  logic q;
  logic q_ref;

  tlu_tff dut (.clk(clk), .rst_n(rst_n), .t(t), .q(q));

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
    q_ref = 1'b0;
    for (int i = 0; i < 300; i++) begin
      @(posedge clk);
      cycles++;
      if (t) begin q_ref = ~q_ref; toggles++; end
      else   holds++;
      #1;
      check("after rising edge", q, q_ref);
      q_before = q;
      @(negedge clk);
      #1;
      check("falling edge holds", q, q_before);
      if (i < 3)        t = 1'b0;
      else if (i < 100) t = 1'b1;
      else              t = (i % 7 == 0) ? 1'b0 : 1'($urandom);
    end
    checks++;
    if (toggles < 50 || holds < 10) begin
      failures++;
      $display("FAIL too few toggles (%0d) or holds (%0d)", toggles, holds);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
