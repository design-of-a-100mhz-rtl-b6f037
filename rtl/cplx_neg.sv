// cplx_neg: negates a complex word with two two's complement circuits, one
// per part. Combinational.
module cplx_neg
  import fft_pkg::*;
(
  input  cplx_t x,
  output cplx_t y
);
  twos_comp #(.W(DW)) u_re (.d(x.re), .neg(y.re));
  twos_comp #(.W(DW)) u_im (.d(x.im), .neg(y.im));
endmodule
