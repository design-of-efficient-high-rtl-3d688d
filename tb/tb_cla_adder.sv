// Exhaustive test of the carry look ahead adder at 4 bits (default) and at
// 8 bits (two look ahead sections): sum and carry-out against integer
// addition, group propagate/generate against their definitions.
module tb_cla_adder;
  logic [3:0] a4, b4, s4;
  logic [7:0] a8, b8, s8;
  logic       cin, c4, c8, pg4, gg4, pg8, gg8;
  int checks = 0, failures = 0;

  cla_adder dut4 (.a(a4), .b(b4), .cin, .sum(s4), .cout(c4), .pg(pg4), .gg(gg4));
  cla_adder #(.WIDTH(8)) dut8 (.a(a8), .b(b8), .cin, .sum(s8), .cout(c8), .pg(pg8), .gg(gg8));

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
      // PG: all bits propagate; GG: the adder makes a carry with cin = 0
      if ({c4, s4} !== 5'(int'(a4) + int'(b4) + int'(cin)) ||
          pg4 !== ((a4 ^ b4) == 4'hF) || gg4 !== (int'(a4) + int'(b4) > 15)) begin
        failures++;
        $display("FAIL4 %0d+%0d+%0d = %b%b pg=%b gg=%b", a4, b4, cin, c4, s4, pg4, gg4);
      end
    end
    for (int i = 0; i < 131072; i++) begin
      {a8, b8, cin} = 17'(i);
      #1;
      checks++;
      if ({c8, s8} !== 9'(int'(a8) + int'(b8) + int'(cin)) ||
          pg8 !== ((a8 ^ b8) == 8'hFF) || gg8 !== (int'(a8) + int'(b8) > 255)) begin
        failures++;
        if (failures < 10) $display("FAIL8 %0d+%0d+%0d = %b%b", a8, b8, cin, c8, s8);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
