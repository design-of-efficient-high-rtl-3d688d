// Exhaustive test of the arithmetic unit built with each of the three adders:
// every a, b, S1..S0 and cin against a + B + cin with B = 0, b, ~b or 1111.
module tb_arith_unit;
  import cpu4_pkg::*;
  import tb_ref_pkg::*;
  logic [3:0] a, b;
  logic [1:0] sel;
  logic       cin;
  logic [3:0] f [3];
  logic       c [3];
  int checks = 0, failures = 0;

  arith_unit #(.ADDER(ADDER_RCA))  u_rca  (.a, .b, .sel, .cin, .f(f[0]), .cout(c[0]));
  arith_unit                       u_cla  (.a, .b, .sel, .cin, .f(f[1]), .cout(c[1]));
  arith_unit #(.ADDER(ADDER_CSKA)) u_cska (.a, .b, .sel, .cin, .f(f[2]), .cout(c[2]));

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 2048; i++) begin
      logic [4:0] exp_r;
      {sel, cin, a, b} = 11'(i);
      #1;
      exp_r = alu_ref(a, b, {1'b0, sel}, cin);
      for (int k = 0; k < 3; k++) begin
        checks++;
        if ({c[k], f[k]} !== exp_r) begin
          failures++;
          $display("FAIL adder%0d sel=%b cin=%b a=%h b=%h -> %b%h exp %b", k, sel, cin, a, b, c[k], f[k], exp_r);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
