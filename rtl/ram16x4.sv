// 16 x 4 asynchronous RAM with separate data input and output.
//
//   csn  chip select, active low: the RAM does nothing while csn = 1
//   rwn  1 = read, 0 = write
//
// Read: while csn = 0 and rwn = 1, dataout shows the word at addr
// (combinationally); otherwise dataout is 0. Write: while csn = 0 and rwn = 0
// the word at addr follows datain; it keeps its value when either signal
// rises. Having no clock, the write is level sensitive, so the storage is an
// array of latches (the tools report them as latches; that is what this
// unclocked RAM is). Addresses and data must be stable while the write is
// enabled. The contents are not initialised. Ports and their encoding are
// as described for the original RAM model; the 0 on dataout when not reading
// is this design's choice.
module ram16x4 #(
  parameter int unsigned DEPTH = 16,
  parameter int unsigned WIDTH = 4
) (
  input  logic [$clog2(DEPTH)-1:0] addr,
  input  logic [WIDTH-1:0]         datain,
  input  logic                     csn,
  input  logic                     rwn,
  output logic [WIDTH-1:0]         dataout
);

  logic [WIDTH-1:0] mem [DEPTH];

  always_latch begin
    if (!csn && !rwn) mem[addr] = datain;
  end

  assign dataout = (!csn && rwn) ? mem[addr] : '0;

endmodule
