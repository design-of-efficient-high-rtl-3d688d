// Exhaustive test of the four primitive gates against their truth tables.
module tb_basic_gate;
  import cpu4_pkg::*;
  logic a, b;
  logic y_and, y_or, y_xor, y_not;
  int checks = 0, failures = 0;

  basic_gate #(.KIND(GATE_AND)) u_and (.a, .b, .y(y_and));
  basic_gate #(.KIND(GATE_OR))  u_or  (.a, .b, .y(y_or));
  basic_gate #(.KIND(GATE_XOR)) u_xor (.a, .b, .y(y_xor));
  basic_gate #(.KIND(GATE_NOT)) u_not (.a, .b, .y(y_not));

  task automatic chk(input logic got, input logic exp, input string what);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s a=%b b=%b got=%b exp=%b", what, a, b, got, exp);
    end
  endtask

  initial begin
    #1000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 4; i++) begin
      {a, b} = 2'(i);
      #1;
      chk(y_and, (i == 3), "AND");
      chk(y_or,  (i != 0), "OR");
      chk(y_xor, (i == 1 || i == 2), "XOR");
      chk(y_not, (i < 2), "NOT");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
