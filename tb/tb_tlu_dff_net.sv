// Self-checking test of tlu_dff_net: the next-state network of the D flip-
// flop, with v = {qn, l, d}: load D when L = 1, hold Qn when L = 0, the next-
// state table of a D flip-flop.
// Every input pattern is applied and the output compared with the Boolean
// function written out here, v[1] ? v[0] : v[2].
module tb_tlu_dff_net;
  int checks = 0;
  int failures = 0;
  logic [2:0] v;
  logic y;

  tlu_dff_net dut (.d(v[0]), .l(v[1]), .qn(v[2]), .q_next(y));

  initial begin
    #100000;
    failures++;
    $display("FAIL watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic exp;
    for (int i = 0; i < 8; i++) begin
      v = 3'(i);
      #1;
      exp = v[1] ? v[0] : v[2];
      checks++;
      if (y !== exp) begin
        failures++;
        $display("FAIL inputs=%b y=%b expected %b", v, y, exp);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
