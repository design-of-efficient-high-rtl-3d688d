// End-to-end test of the top level: the three processing units (ripple carry,
// carry look ahead, carry skip) run the same assembly-style program at their
// default configuration and must all match a reference model of RAM and ALU
// after every instruction, at 4 cycles per instruction.
//
// The program stores a value in every RAM word, then exercises each row of
// the ALU table, then runs random instructions, applies an asynchronous reset
// in mid-program and finally reads every word back. Counted mechanisms, each
// of which must occur at least once: every one of the 12 ALU table rows, an
// adder carry-out of 1, a carry that skips the carry-skip group, a carry
// look ahead group propagate, a RAM read and a RAM write on the bidirectional
// bus, and the asynchronous reset.
module tb_cpu4_top;
  import cpu4_pkg::*;
  import tb_ref_pkg::*;

  logic            clk = 0, rst_n = 0;
  instr_t    [2:0] instr;
  logic [2:0][3:0] op1, op2;
  logic      [2:0] ready, cout;
  logic [2:0][3:0] databus;

  cpu4_top dut (.clk, .rst_n, .instr, .op1, .op2, .ready, .databus, .cout);

  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  logic [3:0] model [16];
  int cycle = 0, last_ready = -1;
  always @(posedge clk) cycle++;

  // mechanism counters
  int row_seen [12];
  int n_carry = 0, n_skip = 0, n_cla_pg = 0, n_rd = 0, n_wr = 0, n_reset = 0;

  always @(posedge clk) begin
    if (dut.g_unit[2].u_cpu.u_alu.en &&
        dut.g_unit[2].u_cpu.u_alu.u_alu.u_arith.g_cska.u_add.skip[0] &&
        dut.g_unit[2].u_cpu.u_alu.u_alu.u_arith.g_cska.u_add.cin) n_skip++;
    if (dut.g_unit[1].u_cpu.u_alu.en &&
        dut.g_unit[1].u_cpu.u_alu.u_alu.u_arith.g_cla.u_add.pg) n_cla_pg++;
    if (dut.g_unit[0].u_cpu.u_ram.oe) n_rd++;
    if (!dut.g_unit[0].u_cpu.u_ram.csn_q && !dut.g_unit[0].u_cpu.u_ram.rwn_q) n_wr++;
  end

  task automatic chk(input logic ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s at %0t", what, $time);
    end
  endtask

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic int row_of(input logic [2:0] op, input logic c);
    return op[2] ? 8 + int'(op[1:0]) : 2 * int'(op) + int'(c);
  endfunction

  task automatic run(input alu_sel_e op, input logic c, input logic [3:0] x, input logic [3:0] y);
    logic [4:0] r;
    @(negedge clk);
    while (ready != 3'b111) @(negedge clk);
    chk(ready == 3'b111, "all units ready");
    if (last_ready >= 0) chk(cycle - last_ready == 4, "4 cycles per instruction");
    last_ready = cycle;
    for (int u = 0; u < 3; u++) begin
      instr[u] = '{op: op, cin: c}; op1[u] = x; op2[u] = y;
    end
    r = alu_ref(x, model[y], op, c);
    model[y] = r[3:0];
    row_seen[row_of(op, c)]++;
    if (r[4]) n_carry++;
    repeat (3) @(negedge clk);
    for (int u = 0; u < 3; u++) begin
      checks++;
      if ({cout[u], databus[u]} !== r) begin
        failures++;
        $display("FAIL unit %0d op=%s cin=%b a=%h RAM[%0d]: got %b%h exp %b",
                 u, op.name(), c, x, y, cout[u], databus[u], r);
      end
    end
  endtask

  initial begin
    for (int u = 0; u < 3; u++) begin
      instr[u] = '{op: SEL_ZERO, cin: 1'b0}; op1[u] = '0; op2[u] = '0;
    end
    repeat (2) @(negedge clk);
    rst_n = 1;
    // load RAM: RAM[i] = i ^ 4'h9
    for (int i = 0; i < 16; i++) run(SEL_ZERO, 1'b0, 4'(i) ^ 4'h9, 4'(i));
    // one instruction per ALU table row, with operands that make carries
    for (int s = 0; s < 8; s++)
      for (int c = 0; c < 2; c++)
        run(alu_sel_e'(3'(s)), 1'(c), 4'hF - 4'(s), 4'(2 * s + c));
    // a carry through all four propagate bits: 0101 + 1010 + 1
    run(SEL_ZERO, 1'b0, 4'hA, 4'd3);
    run(SEL_B, 1'b1, 4'h5, 4'd3);
    for (int k = 0; k < 500; k++)
      run(alu_sel_e'(3'($urandom)), 1'($urandom), 4'($urandom), 4'($urandom));
    // asynchronous reset in mid-instruction: outputs clear, RAM keeps its data
    run(SEL_B, 1'b0, 4'h3, 4'd1);
    @(negedge clk);
    #2 rst_n = 0;
    #1 chk(databus == '0 && cout == '0 && ready == 3'b111, "async reset clears outputs");
    n_reset++;
    // the units fetch as soon as reset ends: present a harmless instruction
    // (RAM[0] = 0 | RAM[0])
    for (int u = 0; u < 3; u++) begin
      instr[u] = '{op: SEL_OR, cin: 1'b0}; op1[u] = '0; op2[u] = '0;
    end
    @(negedge clk);
    rst_n = 1;
    last_ready = -1;
    // read back every word
    for (int i = 0; i < 16; i++) run(SEL_OR, 1'b0, 4'h0, 4'(i));

    for (int r = 0; r < 12; r++) chk(row_seen[r] > 0, $sformatf("ALU table row %0d used", r));
    chk(n_carry > 0, "carry-out seen");
    chk(n_skip > 0, "carry skip seen");
    chk(n_cla_pg > 0, "look ahead group propagate seen");
    chk(n_rd > 0 && n_wr > 0, "RAM reads and writes seen");
    chk(n_reset > 0, "reset applied");
    $display("mechanisms: carry-out=%0d skip=%0d cla_pg=%0d ram_rd=%0d ram_wr=%0d reset=%0d",
             n_carry, n_skip, n_cla_pg, n_rd, n_wr, n_reset);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
