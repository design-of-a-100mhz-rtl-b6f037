// tb_dft4_proc: the 4-point DFT processor driven the way the controller
// drives it: in each 28-cycle slot four words are loaded into IL (lane order
// F0, F2, F1, F3), the four OL results of the butterfly three slots earlier
// are read from the bus one OL at a time, and xfer is pulsed in the last
// cycle. Each result is compared with
//   X(p) = sum_l W64^(l*a) F(l) (-j)^(lp)
// computed here in floating point with the phase factors rounded to 1/512,
// so only the truncation of the products (a few LSB) is allowed as error.
module tb_dft4_proc;
  import fft_pkg::*;
  localparam int unsigned T = 28, NB = 10;
  logic clk = 1'b0, rst_n = 1'b0, xfer = 1'b0, mult_busy;
  cplx_t bus_in = '0, bus_out;
  logic [3:0] il_load = '0, ol_oe = '0;
  logic [ROMAW-1:0] rom_addr = '0;
  int checks = 0, failures = 0;
  dft4_proc dut (.*);
  always #5 clk = ~clk;
  initial begin
    #10000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic real qr(input real v);
    return (v >= 0.0) ? real'($rtoi(v * 512.0 + 0.5)) / 512.0 : -real'($rtoi(-v * 512.0 + 0.5)) / 512.0;
  endfunction

  int fr [NB][4], fi [NB][4];
  int addr_of [NB];
  real xr [NB][4], xi [NB][4];

  initial begin
    // butterfly inputs, twiddle addresses and expected outputs
    for (int b = 0; b < NB; b++) begin
      addr_of[b] = (b == 0) ? 0 : int'($urandom_range(15));
      for (int l = 0; l < 4; l++) begin
        fr[b][l] = int'($urandom_range(400000)) - 200000;
        fi[b][l] = int'($urandom_range(400000)) - 200000;
      end
      for (int p = 0; p < 4; p++) begin
        xr[b][p] = 0.0; xi[b][p] = 0.0;
        for (int l = 0; l < 4; l++) begin
          real th, wr, wi, tr, ti;
          th = 2.0 * 3.14159265358979 * ((l * addr_of[b]) % 64) / 64.0;
          wr = qr($cos(th)); wi = qr(-$sin(th));
          tr = fr[b][l] * wr - fi[b][l] * wi;
          ti = fr[b][l] * wi + fi[b][l] * wr;
          case ((l * p) % 4)   // (-j)^(lp)
            0: begin xr[b][p] += tr; xi[b][p] += ti; end
            1: begin xr[b][p] += ti; xi[b][p] -= tr; end
            2: begin xr[b][p] -= tr; xi[b][p] -= ti; end
            default: begin xr[b][p] -= ti; xi[b][p] += tr; end
          endcase
        end
      end
    end

    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    for (int s = 0; s < NB + 3; s++) begin
      rom_addr = (s < NB) ? ROMAW'(addr_of[s]) : '0;
      for (int c = 0; c < T; c++) begin
        il_load = '0; ol_oe = '0; xfer = 1'b0;
        if (c < 4 && s < NB) begin
          int l;
          l = (c == 1) ? 2 : (c == 2) ? 1 : c;   // lane c carries F(l)
          bus_in.re = DW'(fr[s][l]);
          bus_in.im = DW'(fi[s][l]);
          il_load[c] = 1'b1;
        end
        if (c >= 4 && c < 8 && s >= 3) begin
          ol_oe[c-4] = 1'b1;
          #1;
          checks++;
          if (fabs(real'(bus_out.re) - xr[s-3][c-4]) > 4.0 || fabs(real'(bus_out.im) - xi[s-3][c-4]) > 4.0) begin
            failures++;
            $display("butterfly %0d X(%0d) = (%0d, %0d), expected (%f, %f)", s - 3, c - 4,
                     bus_out.re, bus_out.im, xr[s-3][c-4], xi[s-3][c-4]);
          end
        end
        if (c == T - 1) xfer = 1'b1;
        @(negedge clk);
        if (c == 0 && s >= 1 && s <= NB) begin
          checks++;
          if (!mult_busy) begin failures++; $display("multipliers idle after xfer"); end
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic real fabs(input real v);
    return (v < 0.0) ? -v : v;
  endfunction
endmodule
