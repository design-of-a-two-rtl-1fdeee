// Self-checking test of tlu_or2: the threshold-logic OR gate.
// Every input pattern is applied and the output compared with the Boolean
// function written out here, v[0] | v[1].
module tb_tlu_or2;
  int checks = 0;
  int failures = 0;
  logic [1:0] v;
  logic y;

  tlu_or2 dut (.a(v[0]), .b(v[1]), .y(y));

  initial begin
    #100000;
    failures++;
    $display("FAIL watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic exp;
    for (int i = 0; i < 4; i++) begin
      v = 2'(i);
      #1;
      exp = v[0] | v[1];
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
