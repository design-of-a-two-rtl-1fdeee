// Self-checking test of tlu_node_a: node A of the D flip-flop network, with v
// = {qn, l, d}. With D = 1 it must follow the next-state table it was trained
// on (set on L = 1, else hold Qn); with D = 0 it must give 0 whatever L and Qn
// are.
// Every input pattern is applied and the output compared with the Boolean
// function written out here, v[0] ? (v[1] | v[2]) : 1'b0.
module tb_tlu_node_a;
  int checks = 0;
  int failures = 0;
  logic [2:0] v;
  logic y;

  tlu_node_a dut (.d(v[0]), .l(v[1]), .qn(v[2]), .y(y));

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
      exp = v[0] ? (v[1] | v[2]) : 1'b0;
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
