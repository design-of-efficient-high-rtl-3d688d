// Test of the synchronous 16x4 RAM on its bidirectional bus. The testbench
// drives the bus only for writes and releases it for reads. Checks the
// one-cycle timing (a read requested in cycle t shows on the bus in cycle
// t+1), that the RAM does not drive the bus otherwise, and that reset
// deselects it.
module tb_ram16x4_sync;
  logic       clk = 0, rst_n = 0;
  logic [3:0] addr = 0, wdata = 0;
  logic       csn = 1, rwn = 1, tb_drive = 0;
  wire  [3:0] data;
  logic [3:0] model [16];
  int checks = 0, failures = 0;

  assign data = tb_drive ? wdata : 4'bz;

  ram16x4_sync dut (.clk, .rst_n, .addr, .csn, .rwn, .data);

  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(input logic got, input logic exp, input string what);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s at %0t", what, $time);
    end
  endtask

  task automatic write(input logic [3:0] a, input logic [3:0] d);
    @(negedge clk);
    addr = a; wdata = d; tb_drive = 1; csn = 0; rwn = 0;
    model[a] = d;
    @(negedge clk);
    tb_drive = 0; csn = 1; rwn = 1;
    chk(dut.oe, 1'b0, "no drive during write");
  endtask

  task automatic read(input logic [3:0] a);
    @(negedge clk);
    addr = a; csn = 0; rwn = 1;
    chk(dut.oe, 1'b0, "no drive before the read edge");
    @(negedge clk);
    csn = 1;
    chk(dut.oe, 1'b1, "drives in the next cycle");
    checks++;
    if (data !== model[a]) begin
      failures++;
      $display("FAIL read addr=%0d got=%h exp=%h", a, data, model[a]);
    end
    @(negedge clk);
    chk(dut.oe, 1'b0, "released after one cycle");
  endtask

  initial begin
    repeat (2) @(negedge clk);
    chk(dut.oe, 1'b0, "idle in reset");
    rst_n = 1;
    for (int i = 0; i < 16; i++) write(4'(i), 4'($urandom));
    for (int i = 0; i < 16; i++) read(4'(15 - i));
    for (int k = 0; k < 200; k++) begin
      if ($urandom % 2) write(4'($urandom), 4'($urandom));
      else read(4'($urandom));
    end
    // reset while a read is pending: bus released at once
    @(negedge clk);
    addr = 0; csn = 0; rwn = 1;
    @(posedge clk); #1;
    chk(dut.oe, 1'b1, "read pending");
    rst_n = 0;
    #1 chk(dut.oe, 1'b0, "reset releases bus");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
