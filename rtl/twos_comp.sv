// twos_comp: W-bit two's complement circuit, neg = -d. As in the original design,
// every bit is inverted and the constant 000...001 is added with a parallel
// adder. Combinational. The most negative value maps to itself.
module twos_comp #(
  parameter int unsigned W = 27
) (
  input  logic [W-1:0] d,
  output logic [W-1:0] neg
);
  logic [W-1:0] d_n;
  assign d_n = ~d;
  ripple_adder #(.W(W)) u_add (.a(d_n), .b(W'(1)), .cin(1'b0), .s(neg));
endmodule
