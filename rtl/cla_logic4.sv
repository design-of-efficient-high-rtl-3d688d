// Four-bit carry look ahead unit. From the propagate and generate signals of
// four bit positions and the carry-in c0 it forms every carry directly, as a
// two-level sum of products, instead of letting it ripple:
//
//   C_{i+1} = G_i + P_i G_{i-1} + P_i P_{i-1} G_{i-2} + ... + P_i..P_0 c0
//
// It also gives the group propagate PG = P3 P2 P1 P0 and group generate
// GG = G3 + P3 G2 + P3 P2 G1 + P3 P2 P1 G0, so that units can be combined into
// wider adders. c[0] is c0 passed through for convenience; c[4] is C4.
// The PG/GG definitions are the usual ones; only their names are given.
// Combinational.
module cla_logic4 (
  input  logic [3:0] p,
  input  logic [3:0] g,
  input  logic       c0,
  output logic [4:0] c,
  output logic       pg,
  output logic       gg
);

  always_comb begin
    logic term;
    c[0] = c0;
    for (int i = 0; i < 4; i++) begin
      // carry into bit i+1: one product term per possible carry origin
      c[i+1] = g[i];
      for (int j = i - 1; j >= -1; j--) begin
        term = (j >= 0) ? g[j] : c0;
        for (int k = j + 1; k <= i; k++) term &= p[k];
        c[i+1] |= term;
      end
    end
    pg = &p;
    gg = g[3] | (p[3] & g[2]) | (p[3] & p[2] & g[1]) | (p[3] & p[2] & p[1] & g[0]);
  end

endmodule
