// ripple_adder: W-bit parallel binary adder made of W cascaded full adders,
// the carry of each bit feeding the next (as in the original design's 27-bit adder).
// s = a + b + cin modulo 2**W; the end carry out of the sign bit is dropped,
// which is how two's complement subtraction ignores it. Combinational; the
// worst-case path is the full carry chain. Using a full adder at bit 0 (with
// a carry input) rather than a half adder is this design's choice: it lets
// the same adder add the +1 of a two's complement.
module ripple_adder #(
  parameter int unsigned W = 27
) (
  input  logic [W-1:0] a,
  input  logic [W-1:0] b,
  input  logic         cin,
  output logic [W-1:0] s
);
  logic [W:0] c;
  assign c[0] = cin;
  for (genvar i = 0; i < W; i++) begin : g_bit
    full_adder u_fa (.a(a[i]), .b(b[i]), .c(c[i]), .s(s[i]), .co(c[i+1]));
  end
endmodule
