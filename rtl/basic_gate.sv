// Behavioural primitive gate: AND, OR, XOR or NOT, chosen by the KIND
// parameter. These are the first-stage gates from which the full adder is
// built structurally. Purely combinational. For GATE_NOT the output is ~a and
// input b is not used (it exists so that all four gates share one port list).
module basic_gate
  import cpu4_pkg::*;
#(
  parameter gate_kind_e KIND = GATE_AND
) (
  input  logic a,
  input  logic b,
  output logic y
);

  always_comb begin
    unique case (KIND)
      GATE_AND: y = a & b;
      GATE_OR:  y = a | b;
      GATE_XOR: y = a ^ b;
      GATE_NOT: y = ~a;
    endcase
  end

endmodule
