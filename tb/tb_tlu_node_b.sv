// Self-checking test of tlu_node_b: node B of the D flip-flop network, with v
// = {qn, l}. It must follow the D = 0 next-state table it was trained on:
// clear on L = 1, else hold Qn.
// Every input pattern is applied and the output compared with the Boolean
// function written out here, v[1] & ~v[0].
module tb_tlu_node_b;
  int checks = 0;
  int failures = 0;
  logic [1:0] v;
  logic y;

  tlu_node_b dut (.l(v[0]), .qn(v[1]), .y(y));

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
      exp = v[1] & ~v[0];
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
