// Registered ALU: the combinational ALU followed by registers for f and cout,
// loaded on the rising clock edge when en is 1 and cleared to 0 by the
// active-low asynchronous reset rst_n. The result of inputs presented in one
// cycle is visible on f/cout in the next cycle and held until the next load.
// The load enable is this design's addition: it lets the instruction decoder
// keep the result stable while it writes it back to RAM.
module alu_registered
  import cpu4_pkg::*;
#(
  parameter int unsigned WIDTH = DATA_W,
  parameter adder_kind_e ADDER = ADDER_CLA
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             en,
  input  logic [WIDTH-1:0] a,
  input  logic [WIDTH-1:0] b,
  input  alu_sel_e         sel,
  input  logic             cin,
  output logic [WIDTH-1:0] f,
  output logic             cout
);

  logic [WIDTH-1:0] f_d;
  logic             cout_d;

  alu #(.WIDTH(WIDTH), .ADDER(ADDER)) u_alu (
    .a(a), .b(b), .sel(sel), .cin(cin), .f(f_d), .cout(cout_d)
  );

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      f    <= '0;
      cout <= 1'b0;
    end else if (en) begin
      f    <= f_d;
      cout <= cout_d;
    end
  end

endmodule
