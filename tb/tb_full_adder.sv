// Exhaustive test of the one-bit full adder: sum, carry, propagate, generate.
module tb_full_adder;
  logic a, b, cin, s, cout, p, g;
  int checks = 0, failures = 0;

  full_adder dut (.a, .b, .cin, .s, .cout, .p, .g);

  initial begin
    #1000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 8; i++) begin
      int n;
      {a, b, cin} = 3'(i);
      #1;
      n = int'(a) + int'(b) + int'(cin);
      checks++;
      if ({cout, s} !== 2'(n) || p !== (a ^ b) || g !== (a & b)) begin
        failures++;
        $display("FAIL a=%b b=%b cin=%b -> s=%b cout=%b p=%b g=%b", a, b, cin, s, cout, p, g);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
