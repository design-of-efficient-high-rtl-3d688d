// Test of the asynchronous 16x4 RAM: write all words, read them back in a
// different order, check that a write with csn = 1 changes nothing and that
// dataout is 0 unless reading.
module tb_ram16x4;
  logic [3:0] addr = 0, datain = 0, dataout;
  logic       csn = 1, rwn = 1;
  logic [3:0] model [16];
  int checks = 0, failures = 0;

  ram16x4 dut (.addr, .datain, .csn, .rwn, .dataout);

  task automatic chk(input logic [3:0] got, input logic [3:0] exp, input string what);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s addr=%0d got=%h exp=%h", what, addr, got, exp);
    end
  endtask

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 16; i++) begin
      addr = 4'(i); datain = 4'($urandom); model[i] = datain;
      #1 csn = 0; rwn = 0;
      #1 csn = 1;
      #1 rwn = 1;
    end
    // a write attempt while deselected
    addr = 4'd5; datain = ~model[5]; rwn = 0;
    #1 rwn = 1;
    for (int i = 15; i >= 0; i--) begin
      addr = 4'(i * 7);
      #1 chk(dataout, 4'b0, "deselected");
      csn = 0;
      #1 chk(dataout, model[addr], "read");
      rwn = 0; datain = model[addr];
      #1 chk(dataout, 4'b0, "write mode");
      rwn = 1; csn = 1;
    end
    // overwrite pass
    for (int k = 0; k < 100; k++) begin
      addr = 4'($urandom); datain = 4'($urandom);
      #1 csn = 0; rwn = 0; model[addr] = datain;
      #1 rwn = 1;
      #1 chk(dataout, model[addr], "read after write");
      addr = 4'($urandom);
      #1 chk(dataout, model[addr], "random read");
      csn = 1;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
