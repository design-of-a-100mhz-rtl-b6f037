// cou: combinational operating unit, the 4-point DFT
//   X(k) = sum_{n=0..3} x(n) (-j)^(kn).
// Inputs arrive in the lane order x(0), x(2), x(1), x(3). A first rank of four
// complex adders forms a = x0 + x2, b = x0 - x2, c = x1 + x3, d = x1 - x3, and
// d is turned by -j. A second rank forms
//   X0 = a + c,  X2 = a - c,  X1 = b + (-j)d,  X3 = b - (-j)d.
// That is eight complex adders (sixteen 27-bit adders) and eight 27-bit two's
// complement circuits (for -x2, -x3, -c and -(-j)d), the structure the original design
// gives. Results wrap on overflow. Purely combinational; in the processor it
// sits between the NL and OL latches.
module cou
  import fft_pkg::*;
(
  input  cplx_t x0,
  input  cplx_t x2,
  input  cplx_t x1,
  input  cplx_t x3,
  output cplx_t y [4]
);
  cplx_t x2_n, x3_n, a, b, c, d, dj, c_n, dj_n;

  cplx_neg u_neg_x2 (.x(x2), .y(x2_n));
  cplx_neg u_neg_x3 (.x(x3), .y(x3_n));
  cplx_add u_add_a  (.a(x0), .b(x2),   .s(a));
  cplx_add u_add_b  (.a(x0), .b(x2_n), .s(b));
  cplx_add u_add_c  (.a(x1), .b(x3),   .s(c));
  cplx_add u_add_d  (.a(x1), .b(x3_n), .s(d));
  mul_j #(.NEG_J(1'b1)) u_mj (.x(d), .y(dj));

  cplx_neg u_neg_c  (.x(c),  .y(c_n));
  cplx_neg u_neg_dj (.x(dj), .y(dj_n));
  cplx_add u_add_x0 (.a(a), .b(c),    .s(y[0]));
  cplx_add u_add_x2 (.a(a), .b(c_n),  .s(y[2]));
  cplx_add u_add_x1 (.a(b), .b(dj),   .s(y[1]));
  cplx_add u_add_x3 (.a(b), .b(dj_n), .s(y[3]));
endmodule
