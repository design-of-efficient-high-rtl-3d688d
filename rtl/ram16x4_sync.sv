// 16 x 4 RAM with clock, reset and a bidirectional data bus.
//
// It is the asynchronous ram16x4 with its inputs (addr, csn, rwn and the
// write data taken from the bus) captured in registers on the rising clock
// edge, so that the storage only ever sees inputs that change at clock edges.
// The active-low asynchronous reset deselects the RAM (csn register = 1); it
// does not clear the contents. The data bus is driven by four tristate
// drivers, one per bit, enabled while the registered request is a read.
//
// Timing: a request (csn = 0) presented in cycle t is captured at the end of
// cycle t. A write stores the captured bus value during cycle t+1. A read
// drives the word on the bus during cycle t+1; the master must leave the bus
// undriven then. The bus has several drivers by design (this RAM and the
// master); they are never enabled together.
//
// Clock, reset, the merged bidirectional bus and its four tristate drivers
// are the described design; registering the inputs around the asynchronous
// RAM, and a reset that leaves the contents alone, are this design's choices.
module ram16x4_sync #(
  parameter int unsigned DEPTH = 16,
  parameter int unsigned WIDTH = 4
) (
  input  logic                     clk,
  input  logic                     rst_n,
  input  logic [$clog2(DEPTH)-1:0] addr,
  input  logic                     csn,
  input  logic                     rwn,
  inout  wire  [WIDTH-1:0]         data
);

  logic [$clog2(DEPTH)-1:0] addr_q;
  logic [WIDTH-1:0]         din_q, dout;
  logic                     csn_q, rwn_q, oe;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      addr_q <= '0;
      din_q  <= '0;
      csn_q  <= 1'b1;
      rwn_q  <= 1'b1;
    end else begin
      addr_q <= addr;
      din_q  <= data;
      csn_q  <= csn;
      rwn_q  <= rwn;
    end
  end

  ram16x4 #(.DEPTH(DEPTH), .WIDTH(WIDTH)) u_core (
    .addr(addr_q), .datain(din_q), .csn(csn_q), .rwn(rwn_q), .dataout(dout)
  );

  assign oe = !csn_q && rwn_q;

  for (genvar i = 0; i < WIDTH; i++) begin : g_tri
    assign data[i] = oe ? dout[i] : 1'bz;
  end

endmodule
