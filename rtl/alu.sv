// Combinational 4-bit ALU with eight operations selected by S2..S0 and the
// adder carry-in (table in cpu4_pkg). S2 = 0 selects the arithmetic unit
// (f = a + B + cin, B from S1..S0), S2 = 1 the logic unit (OR, XOR, AND,
// NOT). cout is the adder's carry-out for arithmetic operations and 0 for
// logic operations. The adder is chosen by ADDER. The operation table is the
// described design; cout = 0 for logic operations is this design's choice.
module alu
  import cpu4_pkg::*;
#(
  parameter int unsigned WIDTH = DATA_W,
  parameter adder_kind_e ADDER = ADDER_CLA
) (
  input  logic [WIDTH-1:0] a,
  input  logic [WIDTH-1:0] b,
  input  alu_sel_e         sel,
  input  logic             cin,
  output logic [WIDTH-1:0] f,
  output logic             cout
);

  logic [WIDTH-1:0] f_arith, f_logic;
  logic             c_arith;

  arith_unit #(.WIDTH(WIDTH), .ADDER(ADDER)) u_arith (
    .a(a), .b(b), .sel(sel[1:0]), .cin(cin), .f(f_arith), .cout(c_arith)
  );

  logic_unit #(.WIDTH(WIDTH)) u_logic (
    .a(a), .b(b), .sel(sel[1:0]), .f(f_logic)
  );

  assign f    = sel[2] ? f_logic : f_arith;
  assign cout = sel[2] ? 1'b0    : c_arith;

endmodule
