// Shared types and constants of the 4-bit processor.
//
// The processor word is 4 bits wide and its RAM holds 16 words. The ALU is
// selected by three bits S2..S0 plus the adder carry-in (Table of ALU
// operations below); the instruction presented to the decoder is those four
// bits. The adder inside the ALU is chosen at elaboration time with
// adder_kind_e: ripple carry, carry look ahead or carry skip.
package cpu4_pkg;

  localparam int unsigned DATA_W = 4;   // processor word width
  localparam int unsigned ADDR_W = 4;   // 16-word RAM

  // Adder used in the ALU's arithmetic unit.
  typedef enum logic [1:0] {
    ADDER_RCA  = 2'd0,   // ripple carry
    ADDER_CLA  = 2'd1,   // carry look ahead
    ADDER_CSKA = 2'd2    // carry skip
  } adder_kind_e;

  // ALU select S2..S0. With S2 = 0 the ALU computes a + B + cin where B is
  // chosen by S1..S0; with S2 = 1 it computes a logic function and cin is
  // ignored.
  //   S2..S0  cin=0          cin=1
  //   000     a              a + 1
  //   001     a + b          a + b + 1
  //   010     a + ~b         a + ~b + 1 (a - b)
  //   011     a - 1          a
  //   100     a | b
  //   101     a ^ b
  //   110     a & b
  //   111     ~a
  typedef enum logic [2:0] {
    SEL_ZERO  = 3'b000,   // B = 0000
    SEL_B     = 3'b001,   // B = b
    SEL_NOTB  = 3'b010,   // B = ~b
    SEL_ONES  = 3'b011,   // B = 1111
    SEL_OR    = 3'b100,
    SEL_XOR   = 3'b101,
    SEL_AND   = 3'b110,
    SEL_NOT   = 3'b111
  } alu_sel_e;

  // Instruction word: 3-bit opcode (the ALU select) and the carry-in.
  typedef struct packed {
    alu_sel_e op;
    logic     cin;
  } instr_t;

  // Decoder states, one instruction per trip around the ring.
  typedef enum logic [1:0] {
    ST_FETCH = 2'd0,   // sample instruction and operands
    ST_READ  = 2'd1,   // request RAM[op2]
    ST_EXEC  = 2'd2,   // ALU computes op1 <op> RAM[op2], result registered
    ST_WRITE = 2'd3    // write the result back to RAM[op2]
  } dec_state_e;

  // Two-input gate kinds for basic_gate (NOT uses input a only).
  typedef enum logic [1:0] {
    GATE_AND = 2'd0,
    GATE_OR  = 2'd1,
    GATE_XOR = 2'd2,
    GATE_NOT = 2'd3
  } gate_kind_e;

endpackage
