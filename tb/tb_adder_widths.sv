// The three adders side by side at the wider sizes the comparison covers:
// 8, 16 and 32 bits. Each width gets ripple carry, carry look ahead (sections
// of 4 bits) and carry skip (groups of 4 bits); all are fed the same operands
// and compared with integer addition. Operands are random plus the carry
// extremes (all-ones plus 1, alternating patterns that propagate everywhere).
module tb_adder_widths;
  localparam int N = 20000;

  logic [7:0]  a8,  b8,  s8  [3];
  logic [15:0] a16, b16, s16 [3];
  logic [31:0] a32, b32, s32 [3];
  logic        cin;
  logic        c8 [3], c16 [3], c32 [3];
  logic [7:0]  p8;
  logic [15:0] p16;
  logic [31:0] p32;
  logic        pg8, gg8, pg16, gg16, pg32, gg32;
  logic [1:0]  sk8;
  logic [3:0]  sk16;
  logic [7:0]  sk32;
  int checks = 0, failures = 0, full_skips = 0;

  ripple_carry_adder #(.WIDTH(8))  r8  (.a(a8),  .b(b8),  .cin, .sum(s8[0]),  .cout(c8[0]),  .p(p8));
  cla_adder          #(.WIDTH(8))  l8  (.a(a8),  .b(b8),  .cin, .sum(s8[1]),  .cout(c8[1]),  .pg(pg8),  .gg(gg8));
  carry_skip_adder   #(.WIDTH(8))  k8  (.a(a8),  .b(b8),  .cin, .sum(s8[2]),  .cout(c8[2]),  .skip(sk8));
  ripple_carry_adder #(.WIDTH(16)) r16 (.a(a16), .b(b16), .cin, .sum(s16[0]), .cout(c16[0]), .p(p16));
  cla_adder          #(.WIDTH(16)) l16 (.a(a16), .b(b16), .cin, .sum(s16[1]), .cout(c16[1]), .pg(pg16), .gg(gg16));
  carry_skip_adder   #(.WIDTH(16)) k16 (.a(a16), .b(b16), .cin, .sum(s16[2]), .cout(c16[2]), .skip(sk16));
  ripple_carry_adder #(.WIDTH(32)) r32 (.a(a32), .b(b32), .cin, .sum(s32[0]), .cout(c32[0]), .p(p32));
  cla_adder          #(.WIDTH(32)) l32 (.a(a32), .b(b32), .cin, .sum(s32[1]), .cout(c32[1]), .pg(pg32), .gg(gg32));
  carry_skip_adder   #(.WIDTH(32)) k32 (.a(a32), .b(b32), .cin, .sum(s32[2]), .cout(c32[2]), .skip(sk32));

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic apply(input logic [31:0] x, input logic [31:0] y, input logic c);
    logic [32:0] e32;
    logic [16:0] e16;
    logic [8:0]  e8;
    a8 = x[7:0]; b8 = y[7:0]; a16 = x[15:0]; b16 = y[15:0]; a32 = x; b32 = y; cin = c;
    #1;
    e8  = {1'b0, x[7:0]}  + {1'b0, y[7:0]}  + 9'(c);
    e16 = {1'b0, x[15:0]} + {1'b0, y[15:0]} + 17'(c);
    e32 = {1'b0, x}       + {1'b0, y}       + 33'(c);
    for (int k = 0; k < 3; k++) begin
      checks += 3;
      if ({c8[k], s8[k]} !== e8)     begin failures++; $display("FAIL 8-bit adder %0d: %h+%h+%b", k, a8, b8, c); end
      if ({c16[k], s16[k]} !== e16)  begin failures++; $display("FAIL 16-bit adder %0d: %h+%h+%b", k, a16, b16, c); end
      if ({c32[k], s32[k]} !== e32)  begin failures++; $display("FAIL 32-bit adder %0d: %h+%h+%b", k, a32, b32, c); end
    end
    checks++;
    if (pg32 !== (p32 == '1) || gg32 !== ((33'(x) + 33'(y)) >> 32 == 1)) begin
      failures++;
      $display("FAIL 32-bit group signals");
    end
    if (&sk32 && c) full_skips++;
  endtask

  initial begin
    apply(32'hFFFF_FFFF, 32'h0000_0000, 1'b1);   // carry through every bit
    apply(32'h5555_5555, 32'hAAAA_AAAA, 1'b1);   // all propagate, every group skips
    apply(32'hFFFF_FFFF, 32'hFFFF_FFFF, 1'b1);   // all generate
    apply(32'h0000_0001, 32'hFFFF_FFFF, 1'b0);
    for (int i = 0; i < N; i++) apply($urandom, $urandom, 1'($urandom));
    checks++;
    if (full_skips == 0) begin
      failures++;
      $display("FAIL the carry never skipped all groups");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
