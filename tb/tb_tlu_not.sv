// Self-checking test of tlu_not: the threshold-logic inverter.
// Every input pattern is applied and the output compared with the Boolean
// function written out here, ~v[0].
module tb_tlu_not;
  int checks = 0;
  int failures = 0;
  logic [0:0] v;
  logic y;

  tlu_not dut (.a(v[0]), .y(y));

  initial begin
    #100000;
    failures++;
    $display("FAIL watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic exp;
    for (int i = 0; i < 2; i++) begin
      v = 1'(i);
      #1;
      exp = ~v[0];
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
