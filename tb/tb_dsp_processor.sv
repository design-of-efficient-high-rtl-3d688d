// Test of the 4-bit processor built with each of the three adders. A program
// first stores a value in every RAM word (transfer), then runs random
// instructions RAM[op2] = op1 <op> RAM[op2], and finally reads every word
// back (OR with op1 = 0). Each result on databus/cout is compared with a
// reference model of the RAM and ALU, and every instruction must take
// exactly 4 clock cycles from one ready cycle to the next.
module tb_dsp_processor;
  import cpu4_pkg::*;
  import tb_ref_pkg::*;

  logic       clk = 0, rst_n = 0;
  instr_t     instr = '{op: SEL_ZERO, cin: 1'b0};
  logic [3:0] op1 = 0, op2 = 0;
  logic [2:0] ready, cout;
  logic [3:0] databus [3];

  dsp_processor #(.ADDER(ADDER_RCA))  u_rca  (.clk, .rst_n, .instr, .op1, .op2, .ready(ready[0]), .databus(databus[0]), .cout(cout[0]));
  dsp_processor                       u_cla  (.clk, .rst_n, .instr, .op1, .op2, .ready(ready[1]), .databus(databus[1]), .cout(cout[1]));
  dsp_processor #(.ADDER(ADDER_CSKA)) u_cska (.clk, .rst_n, .instr, .op1, .op2, .ready(ready[2]), .databus(databus[2]), .cout(cout[2]));

  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  logic [3:0] model [16];
  int cycle = 0, last_ready = -1;
  always @(posedge clk) cycle++;

  task automatic chk(input logic ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s at %0t", what, $time);
    end
  endtask

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic run(input alu_sel_e op, input logic c, input logic [3:0] x, input logic [3:0] y);
    logic [4:0] r;
    @(negedge clk);
    while (ready != 3'b111) @(negedge clk);
    chk(ready == 3'b111, "ready");
    if (last_ready >= 0) chk(cycle - last_ready == 4, "4 cycles per instruction");
    last_ready = cycle;
    instr = '{op: op, cin: c}; op1 = x; op2 = y;
    r = alu_ref(x, model[y], op, c);
    model[y] = r[3:0];
    @(negedge clk);
    instr = '{op: alu_sel_e'(3'($urandom)), cin: 1'($urandom)}; op1 = 4'($urandom); op2 = 4'($urandom);
    chk(ready == 3'b000, "busy");
    repeat (2) @(negedge clk);
    // WRITE cycle: the registered result is out
    for (int u = 0; u < 3; u++) begin
      checks++;
      if ({cout[u], databus[u]} !== r) begin
        failures++;
        $display("FAIL unit %0d op=%s cin=%b a=%h b(addr %0d): got %b%h exp %b",
                 u, op.name(), c, x, y, cout[u], databus[u], r);
      end
    end
  endtask

  initial begin
    repeat (2) @(negedge clk);
    chk(databus[0] == 0 && databus[1] == 0 && databus[2] == 0 && cout == 0, "reset clears outputs");
    rst_n = 1;
    for (int i = 0; i < 16; i++) run(SEL_ZERO, 1'b0, 4'($urandom), 4'(i));
    for (int k = 0; k < 400; k++)
      run(alu_sel_e'(3'($urandom)), 1'($urandom), 4'($urandom), 4'($urandom));
    for (int i = 0; i < 16; i++) run(SEL_OR, 1'b0, 4'h0, 4'(i));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
