// Exhaustive test of the logic unit: OR, XOR, AND, NOT for all operands.
module tb_logic_unit;
  logic [3:0] a, b, f, exp_f;
  logic [1:0] sel;
  int checks = 0, failures = 0;

  logic_unit dut (.a, .b, .sel, .f);

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 1024; i++) begin
      {sel, a, b} = 10'(i);
      #1;
      case (sel)
        2'b00: exp_f = a | b;
        2'b01: exp_f = a ^ b;
        2'b10: exp_f = a & b;
        default: exp_f = ~a;
      endcase
      checks++;
      if (f !== exp_f) begin
        failures++;
        $display("FAIL sel=%b a=%h b=%h f=%h exp=%h", sel, a, b, f, exp_f);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
