// Carry look ahead adder. Each bit has a full adder used only for its sum,
// propagate and generate outputs (the partial full adder); the carries into
// the bits come from a 4-bit carry look ahead unit. WIDTH must be a multiple
// of 4: wider adders are made of 4-bit sections whose group propagate PG and
// group generate GG feed a second look ahead level, which forms the carry into
// every section directly (carry into section s+1 = GG_s + PG_s GG_{s-1} + ...
// + PG_s..PG_0 cin), so no carry ripples from section to section. pg and gg
// are the group propagate and generate of the whole adder. Combinational. The
// 4-bit structure is the described one; the second level for wider adders is
// this design's choice.
module cla_adder #(
  parameter int unsigned WIDTH = 4
) (
  input  logic [WIDTH-1:0] a,
  input  logic [WIDTH-1:0] b,
  input  logic             cin,
  output logic [WIDTH-1:0] sum,
  output logic             cout,
  output logic             pg,
  output logic             gg
);

  localparam int unsigned NSEC = WIDTH / 4;

  logic [WIDTH-1:0] p, g, c, fa_cout_unused;
  logic [NSEC:0]    sec_c;
  logic [NSEC-1:0]  sec_pg, sec_gg;

  for (genvar s = 0; s < NSEC; s++) begin : g_sec
    logic c4_unused;   // the section's own C4; the second level supplies it
    cla_logic4 u_cla (
      .p(p[4*s +: 4]), .g(g[4*s +: 4]), .c0(sec_c[s]),
      .c({c4_unused, c[4*s +: 4]}), .pg(sec_pg[s]), .gg(sec_gg[s])
    );
  end

  // Second look ahead level: the carry into section s+1 as a sum of products
  // of the sections' GG and PG and the adder's carry-in, the same expansion
  // cla_logic4 makes for bits. (For one section this is its own C4.)
  always_comb begin
    logic term;
    sec_c[0] = cin;
    for (int s = 0; s < int'(NSEC); s++) begin
      sec_c[s+1] = sec_gg[s];
      for (int j = s - 1; j >= -1; j--) begin
        term = (j >= 0) ? sec_gg[j] : cin;
        for (int k = j + 1; k <= s; k++) term &= sec_pg[k];
        sec_c[s+1] |= term;
      end
    end
  end

  for (genvar i = 0; i < WIDTH; i++) begin : g_bit
    full_adder u_fa (
      .a(a[i]), .b(b[i]), .cin(c[i]),
      .s(sum[i]), .cout(fa_cout_unused[i]), .p(p[i]), .g(g[i])
    );
  end

  assign cout = sec_c[NSEC];

  // group signals of the whole adder
  always_comb begin
    pg = &sec_pg;
    gg = 1'b0;
    for (int s = 0; s < int'(NSEC); s++) gg = sec_gg[s] | (sec_pg[s] & gg);
  end

  initial assert (WIDTH % 4 == 0 && WIDTH > 0)
    else $error("cla_adder: WIDTH must be a positive multiple of 4");

endmodule
