// Exhaustive test of the carry skip adder at 4 bits (default, one group) and
// 8 bits (two groups): sum and carry-out against integer addition, and the
// skip flag of each group against the AND of its bits' propagate signals.
// Counts how often a carry actually skipped a group (skip = 1 and carry-in
// = 1) and fails if that never happened.
module tb_carry_skip_adder;
  logic [3:0] a4, b4, s4;
  logic [7:0] a8, b8, s8;
  logic       cin, c4, c8;
  logic [0:0] sk4;
  logic [1:0] sk8;
  int checks = 0, failures = 0, skipped = 0;

  carry_skip_adder dut4 (.a(a4), .b(b4), .cin, .sum(s4), .cout(c4), .skip(sk4));
  carry_skip_adder #(.WIDTH(8), .GROUP(4)) dut8 (.a(a8), .b(b8), .cin, .sum(s8), .cout(c8), .skip(sk8));

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
      if ({c4, s4} !== 5'(int'(a4) + int'(b4) + int'(cin)) || sk4[0] !== ((a4 ^ b4) == 4'hF)) begin
        failures++;
        $display("FAIL4 %0d+%0d+%0d = %b%b skip=%b", a4, b4, cin, c4, s4, sk4);
      end
      if (sk4[0] && cin) skipped++;
    end
    for (int i = 0; i < 131072; i++) begin
      logic carry_into_hi;
      {a8, b8, cin} = 17'(i);
      #1;
      carry_into_hi = (int'(a8[3:0]) + int'(b8[3:0]) + int'(cin)) > 15;
      checks++;
      if ({c8, s8} !== 9'(int'(a8) + int'(b8) + int'(cin)) ||
          sk8 !== {(a8[7:4] ^ b8[7:4]) == 4'hF, (a8[3:0] ^ b8[3:0]) == 4'hF}) begin
        failures++;
        if (failures < 10) $display("FAIL8 %0d+%0d+%0d = %b%b skip=%b", a8, b8, cin, c8, s8, sk8);
      end
      if (sk8[1] && carry_into_hi) skipped++;
    end
    checks++;
    if (skipped == 0) begin
      failures++;
      $display("FAIL no carry ever skipped a group");
    end
    $display("carries that skipped a group: %0d", skipped);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
