// cplx_add: complex adder, two 27-bit ripple adders side by side (real and
// imaginary part). s = a + b with wrap-around. Combinational.
module cplx_add
  import fft_pkg::*;
(
  input  cplx_t a,
  input  cplx_t b,
  output cplx_t s
);
  ripple_adder #(.W(DW)) u_re (.a(a.re), .b(b.re), .cin(1'b0), .s(s.re));
  ripple_adder #(.W(DW)) u_im (.a(a.im), .b(b.im), .cin(1'b0), .s(s.im));
endmodule
