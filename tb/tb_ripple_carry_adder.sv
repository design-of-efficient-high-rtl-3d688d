// Exhaustive test of the ripple carry adder at 4 bits (default) and 8 bits:
// sum, carry-out and propagate vector against integer addition.
module tb_ripple_carry_adder;
  logic [3:0] a4, b4, s4, p4;
  logic [7:0] a8, b8, s8, p8;
  logic       cin, c4, c8;
  int checks = 0, failures = 0;

  ripple_carry_adder dut4 (.a(a4), .b(b4), .cin, .sum(s4), .cout(c4), .p(p4));
  ripple_carry_adder #(.WIDTH(8)) dut8 (.a(a8), .b(b8), .cin, .sum(s8), .cout(c8), .p(p8));

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 512; i++) begin
      {a4, b4, cin} = 9'(i);
      #1;
      checks++;
      if ({c4, s4} !== 5'(int'(a4) + int'(b4) + int'(cin)) || p4 !== (a4 ^ b4)) begin
        failures++;
        $display("FAIL4 %0d+%0d+%0d = %b%b", a4, b4, cin, c4, s4);
      end
    end
    for (int i = 0; i < 131072; i++) begin
      {a8, b8, cin} = 17'(i);
      #1;
      checks++;
      if ({c8, s8} !== 9'(int'(a8) + int'(b8) + int'(cin)) || p8 !== (a8 ^ b8)) begin
        failures++;
        if (failures < 10) $display("FAIL8 %0d+%0d+%0d = %b%b", a8, b8, cin, c8, s8);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
