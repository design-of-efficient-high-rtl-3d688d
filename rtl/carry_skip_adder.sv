// Carry skip adder. The operands are cut into groups of GROUP bits (4 by
// default); each group is a ripple carry adder. A group's carry-out is
//
//   Carry = C_{i+4} + P(i,i+3) * C_i,   P(i,i+3) = P_{i+3} P_{i+2} P_{i+1} P_i
//
// so when every bit of the group propagates, the group's carry-in reaches the
// next group through one AND and one OR instead of through the ripple chain.
// WIDTH must be a multiple of GROUP. skip[k] is 1 when group k's propagate
// product is 1 (the skip path is the one that decides its carry-out).
// Combinational. The group structure and the carry equation are the
// described design; the skip output is this design's addition for
// observation.
module carry_skip_adder #(
  parameter int unsigned WIDTH = 4,
  parameter int unsigned GROUP = 4
) (
  input  logic [WIDTH-1:0]       a,
  input  logic [WIDTH-1:0]       b,
  input  logic                   cin,
  output logic [WIDTH-1:0]       sum,
  output logic                   cout,
  output logic [WIDTH/GROUP-1:0] skip
);

  localparam int unsigned NGRP = WIDTH / GROUP;

  logic [NGRP:0] gc;   // carry into each group
  assign gc[0] = cin;

  for (genvar k = 0; k < NGRP; k++) begin : g_grp
    logic [GROUP-1:0] p;
    logic             ripple_cout;
    ripple_carry_adder #(.WIDTH(GROUP)) u_rca (
      .a(a[GROUP*k +: GROUP]), .b(b[GROUP*k +: GROUP]), .cin(gc[k]),
      .sum(sum[GROUP*k +: GROUP]), .cout(ripple_cout), .p(p)
    );
    assign skip[k]  = &p;
    assign gc[k+1]  = ripple_cout | (skip[k] & gc[k]);
  end

  assign cout = gc[NGRP];

  initial assert (WIDTH % GROUP == 0 && WIDTH > 0)
    else $error("carry_skip_adder: WIDTH must be a positive multiple of GROUP");

endmodule
