// Instruction decoder: a four-state machine that runs one instruction per
// trip around its ring of states. An instruction is a 3-bit opcode (the ALU
// select S2..S0) plus the adder carry-in, with two 4-bit operands: op1 is an
// immediate value (ALU input a) and op2 is a RAM address. The instruction
// computes
//
//   RAM[op2] <= op1 <op> RAM[op2]
//
// and leaves the result on the registered ALU output. So opcode 000 with
// cin = 0 (transfer a) stores op1 at op2, and OR with op1 = 0 reads a word out.
//
//   FETCH  ready = 1; instr, op1 and op2 are sampled at the end of the cycle
//   READ   RAM read request at op2
//   EXEC   the RAM drives RAM[op2] on the bus; the ALU computes with
//          a = op1, b = bus value and loads its result register (alu_en)
//   WRITE  the decoder drives the ALU result alu_f on the bus and requests
//          a write at op2
//
// An instruction therefore takes 4 clock cycles; its result is on alu_f from
// the WRITE cycle on. The decoder drives the bus only in WRITE. Active-low
// asynchronous reset returns it to FETCH. alu_b is the RAM bus itself: the
// RAM drives it in EXEC, when the ALU samples it.
//
// The 3-bit opcode, the two 4-bit operands and a four-state machine are from
// the design description; the carry-in bit in the instruction, the meaning of
// the operands (immediate and RAM address), the four states and the ready
// output are this design's choices.
module instruction_decoder
  import cpu4_pkg::*;
(
  input  logic              clk,
  input  logic              rst_n,
  // from the program source
  input  instr_t            instr,
  input  logic [DATA_W-1:0] op1,
  input  logic [ADDR_W-1:0] op2,
  output logic              ready,
  // RAM side
  output logic [ADDR_W-1:0] ram_addr,
  output logic              ram_csn,
  output logic              ram_rwn,
  inout  wire  [DATA_W-1:0] ram_data,
  // ALU side
  output logic [DATA_W-1:0] alu_a,
  output logic [DATA_W-1:0] alu_b,
  output alu_sel_e          alu_sel,
  output logic              alu_cin,
  output logic              alu_en,
  input  logic [DATA_W-1:0] alu_f,
  output dec_state_e        state
);

  instr_t            ir;
  logic [DATA_W-1:0] op1_q;
  logic [ADDR_W-1:0] op2_q;
  logic              drive_bus;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state <= ST_FETCH;
      ir    <= '{op: SEL_ZERO, cin: 1'b0};
      op1_q <= '0;
      op2_q <= '0;
    end else begin
      unique case (state)
        ST_FETCH: begin
          ir    <= instr;
          op1_q <= op1;
          op2_q <= op2;
          state <= ST_READ;
        end
        ST_READ:  state <= ST_EXEC;
        ST_EXEC:  state <= ST_WRITE;
        ST_WRITE: state <= ST_FETCH;
      endcase
    end
  end

  always_comb begin
    ready     = (state == ST_FETCH);
    ram_addr  = op2_q;
    ram_csn   = !(state == ST_READ || state == ST_WRITE);
    ram_rwn   = (state != ST_WRITE);
    drive_bus = (state == ST_WRITE);
    alu_a     = op1_q;
    alu_b     = ram_data;
    alu_sel   = ir.op;
    alu_cin   = ir.cin;
    alu_en    = (state == ST_EXEC);
  end

  for (genvar i = 0; i < DATA_W; i++) begin : g_tri
    assign ram_data[i] = drive_bus ? alu_f[i] : 1'bz;
  end

endmodule
