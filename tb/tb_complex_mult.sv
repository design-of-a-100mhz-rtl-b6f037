// tb_complex_mult: complex multiplier against complex arithmetic. Each real
// product is expected as trunc(|a| * |w| / 512) with the xor of the operand
// signs, then re = ar*wr - ai*wi, im = ar*wi + ai*wr. The result is also held
// within 2 LSB of the exact real product, and busy must last 26 cycles.
module tb_complex_mult;
  function automatic real fabs(input real v);
    return (v < 0.0) ? -v : v;
  endfunction
  import fft_pkg::*;
  logic clk = 1'b0, rst_n = 1'b0, start = 1'b0, busy;
  cplx_t d = '0, p;
  tw_t w = '0;
  int checks = 0, failures = 0;
  complex_mult dut (.*);
  always #5 clk = ~clk;
  initial begin
    #2000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic longint rp(input longint a, input bit ws, input longint wm);
    longint m;
    m = ((a < 0 ? -a : a) * wm) >>> 9;
    return ((a < 0) ^ ws) ? -m : m;
  endfunction

  task automatic mul(input longint ar, input longint ai, input tw_t tw);
    int cyc;
    longint er, ei;
    real xr, xi, wr, wi;
    @(negedge clk);
    d.re = DW'(ar); d.im = DW'(ai); w = tw; start = 1'b1;
    @(negedge clk);
    start = 1'b0;
    d = '0; w = '0;
    cyc = 0;
    while (busy) begin
      @(negedge clk);
      cyc++;
    end
    er = rp(ar, tw.re_s, tw.re_m) - rp(ai, tw.im_s, tw.im_m);
    ei = rp(ar, tw.im_s, tw.im_m) + rp(ai, tw.re_s, tw.re_m);
    wr = (tw.re_s ? -1.0 : 1.0) * tw.re_m / 512.0;
    wi = (tw.im_s ? -1.0 : 1.0) * tw.im_m / 512.0;
    xr = ar * wr - ai * wi;
    xi = ar * wi + ai * wr;
    checks += 3;
    if (cyc != MAGW) begin
      failures++;
      $display("busy for %0d cycles, expected %0d", cyc, MAGW);
    end
    if (p.re != DW'(er) || p.im != DW'(ei)) begin
      failures++;
      $display("(%0d,%0d)*W -> (%0d,%0d), expected (%0d,%0d)", ar, ai, p.re, p.im, er, ei);
    end
    if (fabs(real'(p.re) - xr) > 2.0 || fabs(real'(p.im) - xi) > 2.0) begin
      failures++;
      $display("(%0d,%0d)*W -> (%0d,%0d), exact (%f,%f)", ar, ai, p.re, p.im, xr, xi);
    end
  endtask

  initial begin
    tw_t t;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    t = '{re_s: 1'b0, re_m: 10'd512, im_s: 1'b0, im_m: 10'd0};     // 1
    mul(1000, -2000, t);
    t = '{re_s: 1'b0, re_m: 10'd0, im_s: 1'b1, im_m: 10'd512};     // -j
    mul(-33554431, 33554431, t);
    for (int i = 0; i < 60; i++) begin
      t.re_s = 1'($urandom); t.re_m = 10'($urandom_range(512));
      t.im_s = 1'($urandom); t.im_m = 10'($urandom_range(512));
      mul(longint'($urandom_range(67108862)) - 33554431,
          longint'($urandom_range(67108862)) - 33554431, t);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
