// tb_mul_j: the -j and +j multipliers against complex arithmetic:
// (A + jB)(-j) = B - jA and (A + jB)(j) = -B + jA.
module tb_mul_j;
  import fft_pkg::*;
  cplx_t x, y_m, y_p;
  int checks = 0, failures = 0;
  mul_j #(.NEG_J(1'b1)) dut   (.x(x), .y(y_m));
  mul_j #(.NEG_J(1'b0)) dut_p (.x(x), .y(y_p));
  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    for (int i = 0; i < 300; i++) begin
      x.re = DW'($urandom_range(2000000)) - DW'(1000000);
      x.im = DW'($urandom_range(2000000)) - DW'(1000000);
      #1;
      checks += 2;
      if (y_m.re != x.im || y_m.im != -x.re) begin
        failures++;
        $display("-j * (%0d, %0d) = (%0d, %0d)", x.re, x.im, y_m.re, y_m.im);
      end
      if (y_p.re != -x.im || y_p.im != x.re) begin
        failures++;
        $display("j * (%0d, %0d) = (%0d, %0d)", x.re, x.im, y_p.re, y_p.im);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
