// Three 4-bit processing units side by side, identical except for the adder
// in the ALU: unit 0 uses the ripple carry adder, unit 1 the carry look ahead
// adder and unit 2 the carry skip adder. They share clock and reset; each has
// its own instruction input, operands and outputs (index = unit). Fed the same
// program, the three give the same results cycle for cycle; they differ only
// in the length of the ALU's carry path. See dsp_processor for the
// instruction sequence (4 cycles per instruction). The three variants are
// the described design; putting them side by side in one top is this
// design's way of keeping all three buildable and comparable.
module cpu4_top
  import cpu4_pkg::*;
(
  input  logic                   clk,
  input  logic                   rst_n,
  input  instr_t     [2:0]       instr,
  input  logic       [2:0][3:0]  op1,
  input  logic       [2:0][3:0]  op2,
  output logic       [2:0]       ready,
  output logic       [2:0][3:0]  databus,
  output logic       [2:0]       cout
);

  localparam adder_kind_e KINDS [3] = '{ADDER_RCA, ADDER_CLA, ADDER_CSKA};

  for (genvar u = 0; u < 3; u++) begin : g_unit
    dsp_processor #(.ADDER(KINDS[u])) u_cpu (
      .clk, .rst_n, .instr(instr[u]), .op1(op1[u]), .op2(op2[u]),
      .ready(ready[u]), .databus(databus[u]), .cout(cout[u])
    );
  end

endmodule
