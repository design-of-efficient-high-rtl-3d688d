// Test of the registered ALU: results appear one clock after their inputs,
// are held while en = 0, and the asynchronous active-low reset clears f and
// cout without a clock edge.
module tb_alu_registered;
  import cpu4_pkg::*;
  import tb_ref_pkg::*;
  logic       clk = 0, rst_n = 0, en = 0, cin = 0;
  logic [3:0] a = 0, b = 0, f;
  alu_sel_e   sel = SEL_ZERO;
  logic       cout;
  int checks = 0, failures = 0;
  logic [4:0] held;

  alu_registered dut (.clk, .rst_n, .en, .a, .b, .sel, .cin, .f, .cout);

  always #5 clk = ~clk;

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(input logic [4:0] exp_r, input string what);
    checks++;
    if ({cout, f} !== exp_r) begin
      failures++;
      $display("FAIL %s: got %b%h exp %b", what, cout, f, exp_r);
    end
  endtask

  initial begin
    #12 chk(5'b0, "in reset");
    rst_n = 1;
    for (int i = 0; i < 500; i++) begin
      logic [4:0] exp_r;
      @(negedge clk);
      a = 4'($urandom); b = 4'($urandom); cin = 1'($urandom);
      sel = alu_sel_e'(3'($urandom));
      en = 1'($urandom);
      held = {cout, f};
      exp_r = en ? alu_ref(a, b, sel, cin) : held;
      // before the edge the output still holds the previous result
      chk(held, "before edge");
      @(posedge clk); #1;
      chk(exp_r, en ? "loaded" : "held");
    end
    // asynchronous reset in mid-cycle
    @(negedge clk);
    a = 4'hF; b = 4'h1; sel = SEL_B; cin = 0; en = 1;
    @(posedge clk); #1;
    chk(5'b10000, "15+1 carry");
    #2 rst_n = 0;
    #1 chk(5'b0, "async reset");
    rst_n = 1;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
