// End-to-end test of the two-bit threshold-logic up-counter (tlu_counter2),
// at its default (and only) configuration.
//
// A 200-unit clock (high and low for 100 each) drives the counter. After
// reset the count must run 0, 1, 2, 3, 0, 1, 2, ... one step per rising
// edge; the first seven values are compared with that printed sequence and
// the rest with a modulo-4 reference. The count is sampled 50 units after
// each rising edge (the ripple into bit 1 has settled by then) and again just
// after each falling edge, which must not change it. Halfway through, rst_n
// is pulsed in the middle of a clock phase while the count is odd, so that
// the reset also hits the second stage's derived clock; the count must drop
// to 0 at once and restart from 0.
//
// Mechanisms counted, each of which must occur: increments of bit 0 alone,
// carries into bit 1 (1 -> 2), wrap-arounds (3 -> 0), falling edges that hold
// the count, and asynchronous resets.
module tb_tlu_counter2;
  int checks = 0;
  int failures = 0;
  int cycles = 0;
  int n_inc = 0;
  int n_carry = 0;
  int n_wrap = 0;
  int n_hold = 0;
  int n_reset = 0;

  logic       clk = 1'b0;
  logic       rst_n = 1'b1;
  logic [1:0] q;
  logic [1:0] q_ref;
  logic [1:0] prev;

  tlu_counter2 dut (.clk(clk), .rst_n(rst_n), .q(q));

  always #100 clk = ~clk;

  task automatic check(input string what, input logic [1:0] got, input logic [1:0] exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL cycle %0d %s: q=%0d expected %0d", cycles, what, got, exp);
    end
  endtask

  task automatic count_step(input logic [1:0] from, input logic [1:0] to);
    if (to != from + 2'd1) return;
    case (from)
      2'd0, 2'd2: n_inc++;
      2'd1:       n_carry++;
      2'd3:       n_wrap++;
      default: ;
    endcase
  endtask

  initial begin
    repeat (1000) @(posedge clk);
    failures++;
    $display("FAIL watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [1:0] printed [7] = '{2'h0, 2'h1, 2'h2, 2'h3, 2'h0, 2'h1, 2'h2};
    #1;
    rst_n = 1'b0;
    #1;
    check("in reset", q, 2'd0);
    @(negedge clk);
    rst_n = 1'b1;
    q_ref = 2'd0;
    #1;
    check("printed sequence step 0", q, printed[0]);
    for (int i = 1; i <= 200; i++) begin
      prev = q;
      @(posedge clk);
      cycles++;
      q_ref = q_ref + 2'd1;
      #50;
      if (i < 7) check($sformatf("printed sequence step %0d", i), q, printed[i]);
      check("after rising edge", q, q_ref);
      count_step(prev, q);
      @(negedge clk);
      #1;
      check("falling edge holds", q, q_ref);
      if (q == q_ref) n_hold++;
      if (i == 101) begin
        // q_ref is odd here: bit 0 falls under reset, bit 1's clock rises.
        #30;
        rst_n = 1'b0;
        #1;
        check("asynchronous reset", q, 2'd0);
        #20;
        check("held in reset", q, 2'd0);
        rst_n = 1'b1;
        q_ref = 2'd0;
        n_reset++;
      end
    end
    checks++;
    if (n_inc == 0 || n_carry == 0 || n_wrap == 0 || n_hold == 0 || n_reset == 0) begin
      failures++;
      $display("FAIL a mechanism never occurred");
    end
    $display("increments %0d, carries %0d, wrap-arounds %0d, holding falling edges %0d, resets %0d",
             n_inc, n_carry, n_wrap, n_hold, n_reset);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
