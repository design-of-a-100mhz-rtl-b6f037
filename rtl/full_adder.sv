// full_adder: one-bit full adder, the cell that the 27-bit ripple adders are
// built from. s = a xor b xor c, co = majority(a, b, c). Purely combinational.
// The original design implements this cell in complementary pass-transistor logic;
// only its logic function is described here.
module full_adder (
  input  logic a,
  input  logic b,
  input  logic c,
  output logic s,
  output logic co
);
  logic p;
  assign p  = a ^ b;
  assign s  = p ^ c;
  assign co = (a & b) | (p & c);
endmodule
