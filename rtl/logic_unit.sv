// Logic half of the ALU: bitwise OR, XOR, AND of a and b, or NOT of a,
// chosen by S1..S0 (00, 01, 10, 11). Combinational.
module logic_unit #(
  parameter int unsigned WIDTH = 4
) (
  input  logic [WIDTH-1:0] a,
  input  logic [WIDTH-1:0] b,
  input  logic [1:0]       sel,    // S1..S0
  output logic [WIDTH-1:0] f
);

  always_comb begin
    unique case (sel)
      2'b00: f = a | b;
      2'b01: f = a ^ b;
      2'b10: f = a & b;
      2'b11: f = ~a;
    endcase
  end

endmodule
