// Ripple carry adder: WIDTH full adders in a chain, the carry of bit i
// feeding bit i+1 (C0 in at bit 0, C4 out of bit 3 for the 4-bit default).
// Besides sum and carry-out it brings out the per-bit propagate signals
// P_i = A_i ^ B_i, which the carry skip adder uses to decide whether a group
// may be skipped. Combinational; the delay grows linearly with WIDTH because
// the carry passes through every stage. The p output is this design's
// addition, for the carry skip adder.
module ripple_carry_adder #(
  parameter int unsigned WIDTH = 4
) (
  input  logic [WIDTH-1:0] a,
  input  logic [WIDTH-1:0] b,
  input  logic             cin,
  output logic [WIDTH-1:0] sum,
  output logic             cout,
  output logic [WIDTH-1:0] p
);

  logic [WIDTH:0]   c;
  logic [WIDTH-1:0] g_unused;

  assign c[0] = cin;

  for (genvar i = 0; i < WIDTH; i++) begin : g_bit
    full_adder u_fa (
      .a(a[i]), .b(b[i]), .cin(c[i]),
      .s(sum[i]), .cout(c[i+1]), .p(p[i]), .g(g_unused[i])
    );
  end

  assign cout = c[WIDTH];

endmodule
