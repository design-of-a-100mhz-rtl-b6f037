// tb_cou: the combinational operating unit against the 4-point DFT
// X(k) = sum_n x(n) (-j)^(kn), computed here with integer arithmetic modulo
// 2**27 (the unit wraps on overflow). Inputs are random, including values
// large enough to wrap.
module tb_cou;
  import fft_pkg::*;
  cplx_t x [4];
  cplx_t y [4];
  int checks = 0, failures = 0;
  cou dut (.x0(x[0]), .x2(x[2]), .x1(x[1]), .x3(x[3]), .y(y));
  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    for (int i = 0; i < 300; i++) begin
      for (int n = 0; n < 4; n++) begin
        if (i < 150) begin
          x[n].re = DW'($urandom_range(200000)) - DW'(100000);
          x[n].im = DW'($urandom_range(200000)) - DW'(100000);
        end else begin
          x[n].re = DW'($urandom);
          x[n].im = DW'($urandom);
        end
      end
      #1;
      for (int k = 0; k < 4; k++) begin
        longint er, ei;
        er = 0; ei = 0;
        for (int n = 0; n < 4; n++) begin
          // (-j)^m for m = kn mod 4: 1, -j, -1, j
          case ((k * n) % 4)
            0: begin er += x[n].re; ei += x[n].im; end
            1: begin er += x[n].im; ei -= x[n].re; end
            2: begin er -= x[n].re; ei -= x[n].im; end
            default: begin er -= x[n].im; ei += x[n].re; end
          endcase
        end
        checks++;
        if (y[k].re != DW'(er) || y[k].im != DW'(ei)) begin
          failures++;
          $display("X(%0d) = (%0d, %0d), expected (%0d, %0d)", k, y[k].re, y[k].im, DW'(er), DW'(ei));
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
