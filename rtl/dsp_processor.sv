// 4-bit processor: instruction decoder, 16 x 4 RAM and registered ALU.
//
// The decoder receives an instruction (ALU select and carry-in) with two
// operands, reads the RAM word addressed by op2 over the bidirectional data
// bus, has the ALU combine it with op1 and writes the registered result back
// to the same address (see instruction_decoder for the 4-cycle sequence).
// The registered ALU result leaves the processor on databus together with
// cout, and also returns to the decoder, which puts it on the RAM bus for the
// write-back. ADDER selects the ALU's adder; everything else is the same for
// the three processing units. The three parts and their connections follow
// the described block diagram; what an instruction does with the RAM is this
// design's choice.
module dsp_processor
  import cpu4_pkg::*;
#(
  parameter adder_kind_e ADDER = ADDER_CLA
) (
  input  logic              clk,
  input  logic              rst_n,
  input  instr_t            instr,
  input  logic [DATA_W-1:0] op1,
  input  logic [ADDR_W-1:0] op2,
  output logic              ready,
  output logic [DATA_W-1:0] databus,
  output logic              cout
);

  logic [ADDR_W-1:0] ram_addr;
  logic              ram_csn, ram_rwn;
  wire  [DATA_W-1:0] ram_data;
  logic [DATA_W-1:0] alu_a, alu_b, alu_f;
  alu_sel_e          alu_sel;
  logic              alu_cin, alu_en;
  dec_state_e        state_unused;

  instruction_decoder u_dec (
    .clk, .rst_n, .instr, .op1, .op2, .ready,
    .ram_addr, .ram_csn, .ram_rwn, .ram_data,
    .alu_a, .alu_b, .alu_sel, .alu_cin, .alu_en, .alu_f,
    .state(state_unused)
  );

  ram16x4_sync #(.DEPTH(16), .WIDTH(DATA_W)) u_ram (
    .clk, .rst_n, .addr(ram_addr), .csn(ram_csn), .rwn(ram_rwn), .data(ram_data)
  );

  alu_registered #(.WIDTH(DATA_W), .ADDER(ADDER)) u_alu (
    .clk, .rst_n, .en(alu_en), .a(alu_a), .b(alu_b), .sel(alu_sel),
    .cin(alu_cin), .f(alu_f), .cout
  );

  assign databus = alu_f;

endmodule
