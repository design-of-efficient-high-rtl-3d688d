// Exhaustive test of the 4-bit carry look ahead unit: every combination of
// p, g and c0, carries compared with the recurrence C_{i+1} = G_i + P_i C_i
// evaluated bit by bit, and the group PG/GG with their definitions.
module tb_cla_logic4;
  logic [3:0] p, g;
  logic       c0, pg, gg;
  logic [4:0] c;
  int checks = 0, failures = 0;

  cla_logic4 dut (.p, .g, .c0, .c, .pg, .gg);

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 512; i++) begin
      logic [4:0] exp_c;
      logic       exp_gg;
      {p, g, c0} = 9'(i);
      #1;
      exp_c[0] = c0;
      for (int k = 0; k < 4; k++) exp_c[k+1] = g[k] | (p[k] & exp_c[k]);
      // GG is the carry out of the group when its carry-in is 0
      exp_gg = g[0];
      for (int k = 1; k < 4; k++) exp_gg = g[k] | (p[k] & exp_gg);
      checks++;
      if (c !== exp_c || pg !== (&p) || gg !== exp_gg) begin
        failures++;
        $display("FAIL p=%b g=%b c0=%b c=%b exp=%b pg=%b gg=%b", p, g, c0, c, exp_c, pg, gg);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
