// sram: the processor's static RAM, WORDS rows of WIDTH bits (64 x 54 by
// default: one complex data word per row). It holds the input samples, the
// intermediate results of every stage (computed in place) and the output.
// One port: a row address, a write/read line (wr_n = 0 writes din into the
// row at the clock edge, wr_n = 1 reads) and separate data-in and data-out
// lines. Reading is asynchronous: dout shows the addressed row in the same
// cycle. Sizes and port names follow the original design's RAM schematic; the
// synchronous write is this design's choice. Contents are not reset.
module sram #(
  parameter int unsigned WORDS = 64,
  parameter int unsigned WIDTH = 54
) (
  input  logic                     clk,
  input  logic [$clog2(WORDS)-1:0] addr,
  input  logic                     wr_n,
  input  logic [WIDTH-1:0]         din,
  output logic [WIDTH-1:0]         dout
);
  logic [WIDTH-1:0] mem [WORDS];

  always_ff @(posedge clk) begin
    if (!wr_n) mem[addr] <= din;
  end

  assign dout = mem[addr];
endmodule
