// Reference model for the testbenches: the ALU operation table computed
// directly with integer arithmetic, independent of the adder structures.
package tb_ref_pkg;
  import cpu4_pkg::*;

  // Returns {cout, f} for a 4-bit ALU.
  function automatic logic [4:0] alu_ref(input logic [3:0] a, input logic [3:0] b,
                                         input logic [2:0] sel, input logic cin);
    logic [4:0] r;
    case (sel)
      3'b000: r = {1'b0, a} + 5'(cin);
      3'b001: r = {1'b0, a} + {1'b0, b} + 5'(cin);
      3'b010: r = {1'b0, a} + {1'b0, ~b} + 5'(cin);
      3'b011: r = {1'b0, a} + 5'b01111 + 5'(cin);
      3'b100: r = {1'b0, a | b};
      3'b101: r = {1'b0, a ^ b};
      3'b110: r = {1'b0, a & b};
      default: r = {1'b0, ~a};
    endcase
    return r;
  endfunction
endpackage
