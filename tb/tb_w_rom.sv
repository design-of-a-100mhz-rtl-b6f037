// tb_w_rom: every word of the three phase-factor ROMs (exponents 1, 2, 3)
// against W64^(e*a) = cos(2 pi e a / 64) - j sin(2 pi e a / 64) scaled by
// 512: each part must be within half an LSB of the exact value.
module tb_w_rom;
  function automatic real fabs(input real v);
    return (v < 0.0) ? -v : v;
  endfunction
  import fft_pkg::*;
  logic [ROMAW-1:0] addr;
  tw_t w [3];
  int checks = 0, failures = 0;
  w_rom #(.EXP(1)) dut  (.addr(addr), .w(w[0]));
  w_rom #(.EXP(2)) dut2 (.addr(addr), .w(w[1]));
  w_rom #(.EXP(3)) dut3 (.addr(addr), .w(w[2]));
  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    for (int a = 0; a < 16; a++) begin
      addr = ROMAW'(a);
      #1;
      for (int e = 1; e <= 3; e++) begin
        real th, gr, gi;
        th = 2.0 * 3.14159265358979 * e * a / 64.0;
        gr = (w[e-1].re_s ? -1.0 : 1.0) * w[e-1].re_m;
        gi = (w[e-1].im_s ? -1.0 : 1.0) * w[e-1].im_m;
        checks++;
        if (fabs(gr - 512.0 * $cos(th)) > 0.5 || fabs(gi + 512.0 * $sin(th)) > 0.5) begin
          failures++;
          $display("ROM exp %0d word %0d = (%f, %f), expected (%f, %f)", e, a, gr, gi,
                   512.0 * $cos(th), -512.0 * $sin(th));
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
