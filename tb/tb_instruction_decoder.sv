// Test of the instruction decoder on its own. The testbench stands in for the
// RAM (a 16-word array answering requests with the synchronous RAM's one-cycle
// timing on the shared bus) and for the registered ALU (a reference
// computation loaded on alu_en). It checks the state ring and its 4-cycle
// period, the RAM controls and ALU inputs in every state, and the memory
// contents after each instruction.
module tb_instruction_decoder;
  import cpu4_pkg::*;
  import tb_ref_pkg::*;

  logic              clk = 0, rst_n = 0;
  instr_t            instr;
  logic [3:0]        op1 = 0, op2 = 0;
  logic              ready;
  logic [3:0]        ram_addr;
  logic              ram_csn, ram_rwn;
  wire  [3:0]        ram_data;
  logic [3:0]        alu_a, alu_b, alu_f = 0;
  alu_sel_e          alu_sel;
  logic              alu_cin, alu_en;
  dec_state_e        state;

  // RAM stand-in
  logic [3:0] mem [16], model [16];
  logic [3:0] rq_addr, rq_data;
  logic       rq_rd = 0, rq_wr = 0;
  assign ram_data = rq_rd ? mem[rq_addr] : 4'bz;
  always @(posedge clk) begin
    rq_rd   <= rst_n && !ram_csn && ram_rwn;
    rq_wr   <= rst_n && !ram_csn && !ram_rwn;
    rq_addr <= ram_addr;
    rq_data <= ram_data;
    if (rq_wr) mem[rq_addr] <= rq_data;
  end
  // ALU stand-in
  always @(posedge clk) if (alu_en) alu_f <= 4'(alu_ref(alu_a, alu_b, alu_sel, alu_cin));

  instruction_decoder dut (
    .clk, .rst_n, .instr, .op1, .op2, .ready,
    .ram_addr, .ram_csn, .ram_rwn, .ram_data,
    .alu_a, .alu_b, .alu_sel, .alu_cin, .alu_en, .alu_f, .state
  );

  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  task automatic chk(input logic ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s at %0t (state %s)", what, $time, state.name());
    end
  endtask

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // one instruction: present at a ready cycle, then follow the four states
  task automatic run(input alu_sel_e op, input logic c, input logic [3:0] x, input logic [3:0] y);
    logic [3:0] mval;
    @(negedge clk);
    while (!ready) @(negedge clk);
    chk(ready && state == ST_FETCH, "ready in FETCH");
    chk(ram_csn, "RAM idle in FETCH");
    instr = '{op: op, cin: c}; op1 = x; op2 = y;
    @(negedge clk);
    instr = '{op: alu_sel_e'(3'($urandom)), cin: 1'($urandom)}; op1 = 4'($urandom); op2 = 4'($urandom);
    chk(state == ST_READ && !ready, "READ");
    chk(!ram_csn && ram_rwn && ram_addr == y, "read request");
    chk(!alu_en, "no ALU load in READ");
    @(negedge clk);
    chk(state == ST_EXEC, "EXEC");
    chk(ram_csn, "RAM idle in EXEC");
    chk(alu_en && alu_a == x && alu_b == model[y] && alu_sel == op && alu_cin == c, "ALU inputs");
    mval = 4'(alu_ref(x, model[y], op, c));
    @(negedge clk);
    chk(state == ST_WRITE, "WRITE");
    chk(!ram_csn && !ram_rwn && ram_addr == y && ram_data == mval, "write request");
    chk(!alu_en, "no ALU load in WRITE");
    model[y] = mval;
  endtask

  initial begin
    instr = '{op: SEL_ZERO, cin: 1'b0};
    // the decoder fetches as soon as reset ends: that first instruction
    // (transfer 0 to address 0) agrees with an all-zero memory
    for (int i = 0; i < 16; i++) begin
      mem[i] = '0;
      model[i] = '0;
    end
    repeat (2) @(negedge clk);
    chk(state == ST_FETCH && ram_csn, "reset state");
    rst_n = 1;
    for (int i = 0; i < 16; i++) run(SEL_ZERO, 1'b0, 4'($urandom), 4'(i));
    for (int k = 0; k < 300; k++)
      run(alu_sel_e'(3'($urandom)), 1'($urandom), 4'($urandom), 4'($urandom));
    @(negedge clk); @(negedge clk);
    for (int i = 0; i < 16; i++) chk(mem[i] == model[i], "memory contents");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
