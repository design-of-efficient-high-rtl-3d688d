// One-bit full adder built structurally from basic gates.
//
//   p    = a ^ b            (propagate, P_i)
//   g    = a & b            (generate,  G_i)
//   s    = p ^ cin          (S_i = P_i xor C_i)
//   cout = g | (p & cin)    (C_{i+1} = G_i + P_i C_i)
//
// p and g are brought out so that the same cell serves the ripple carry adder,
// the carry look ahead adder (which uses s, p, g and ignores cout) and the
// carry skip adder (which also needs p). Combinational.
module full_adder
  import cpu4_pkg::*;
(
  input  logic a,
  input  logic b,
  input  logic cin,
  output logic s,
  output logic cout,
  output logic p,
  output logic g
);

  logic p_and_c;

  basic_gate #(.KIND(GATE_XOR)) u_xor_p (.a(a),       .b(b),       .y(p));
  basic_gate #(.KIND(GATE_AND)) u_and_g (.a(a),       .b(b),       .y(g));
  basic_gate #(.KIND(GATE_XOR)) u_xor_s (.a(p),       .b(cin),     .y(s));
  basic_gate #(.KIND(GATE_AND)) u_and_t (.a(p),       .b(cin),     .y(p_and_c));
  basic_gate #(.KIND(GATE_OR))  u_or_c  (.a(g),       .b(p_and_c), .y(cout));

endmodule
