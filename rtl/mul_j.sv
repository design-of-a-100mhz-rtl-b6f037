// mul_j: multiplies a complex word by -j (NEG_J = 1) or by +j (NEG_J = 0).
// (A + jB)(-j) = B - jA: the parts are exchanged and the old real part is
// negated with a two's complement circuit. For +j the old imaginary part is
// negated instead. Combinational, no arithmetic beyond one negation.
module mul_j
  import fft_pkg::*;
#(
  parameter bit NEG_J = 1'b1
) (
  input  cplx_t x,
  output cplx_t y
);
  dword_t to_neg, negated;
  assign to_neg = NEG_J ? x.re : x.im;
  twos_comp #(.W(DW)) u_neg (.d(to_neg), .neg(negated));
  always_comb begin
    if (NEG_J) begin
      y.re = x.im;
      y.im = negated;
    end else begin
      y.re = negated;
      y.im = x.re;
    end
  end
endmodule
