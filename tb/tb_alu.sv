// Exhaustive test of the combinational ALU with each of the three adders:
// all eight selects, both carry-ins and all operands against the operation
// table (reference model in tb_ref_pkg).
module tb_alu;
  import cpu4_pkg::*;
  import tb_ref_pkg::*;
  logic [3:0] a, b;
  alu_sel_e   sel;
  logic       cin;
  logic [3:0] f [3];
  logic       c [3];
  int checks = 0, failures = 0;

  alu #(.ADDER(ADDER_RCA))  u_rca  (.a, .b, .sel, .cin, .f(f[0]), .cout(c[0]));
  alu                       u_cla  (.a, .b, .sel, .cin, .f(f[1]), .cout(c[1]));
  alu #(.ADDER(ADDER_CSKA)) u_cska (.a, .b, .sel, .cin, .f(f[2]), .cout(c[2]));

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 4096; i++) begin
      logic [4:0] exp_r;
      logic [2:0] s;
      {s, cin, a, b} = 12'(i);
      sel = alu_sel_e'(s);
      #1;
      exp_r = alu_ref(a, b, s, cin);
      for (int k = 0; k < 3; k++) begin
        checks++;
        if ({c[k], f[k]} !== exp_r) begin
          failures++;
          if (failures < 20)
            $display("FAIL adder%0d sel=%b cin=%b a=%h b=%h -> %b%h exp %b", k, s, cin, a, b, c[k], f[k], exp_r);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
