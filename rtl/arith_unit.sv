// Arithmetic half of the ALU. A four-way multiplexer chooses the adder's
// second operand from S1..S0 (00: all zeros, 01: b, 10: ~b, 11: all ones) and
// the adder forms f = a + B + cin. With cin this gives transfer, increment,
// add, add with carry, subtract with borrow, subtract, decrement and transfer
// again (see cpu4_pkg). The adder is picked by the ADDER parameter: ripple
// carry, carry look ahead or carry skip; all three give the same sum and
// carry and differ only in their carry path. Combinational.
module arith_unit
  import cpu4_pkg::*;
#(
  parameter int unsigned WIDTH = DATA_W,
  parameter adder_kind_e ADDER = ADDER_CLA
) (
  input  logic [WIDTH-1:0] a,
  input  logic [WIDTH-1:0] b,
  input  logic [1:0]       sel,    // S1..S0
  input  logic             cin,
  output logic [WIDTH-1:0] f,
  output logic             cout
);

  logic [WIDTH-1:0] b_sel;

  always_comb begin
    unique case (sel)
      2'b00: b_sel = '0;
      2'b01: b_sel = b;
      2'b10: b_sel = ~b;
      2'b11: b_sel = '1;
    endcase
  end

  if (ADDER == ADDER_RCA) begin : g_rca
    logic [WIDTH-1:0] p_unused;
    ripple_carry_adder #(.WIDTH(WIDTH)) u_add (
      .a(a), .b(b_sel), .cin(cin), .sum(f), .cout(cout), .p(p_unused)
    );
  end else if (ADDER == ADDER_CSKA) begin : g_cska
    logic [WIDTH/4-1:0] skip_unused;
    carry_skip_adder #(.WIDTH(WIDTH), .GROUP(4)) u_add (
      .a(a), .b(b_sel), .cin(cin), .sum(f), .cout(cout), .skip(skip_unused)
    );
  end else begin : g_cla
    logic pg_unused, gg_unused;
    cla_adder #(.WIDTH(WIDTH)) u_add (
      .a(a), .b(b_sel), .cin(cin), .sum(f), .cout(cout),
      .pg(pg_unused), .gg(gg_unused)
    );
  end

endmodule
