// tb_fft64_top: end-to-end test of the 64-point FFT processor at its default
// parameters. Four transforms are run back to back: an impulse (exact result
// expected), a full-scale constant, a cosine at bin 5 and random samples.
// Every result X(k) is compared with a double-precision DFT computed here,
// allowing the error of the 10-bit phase factors and truncated products. The
// results must also match, bit for bit, a fixed-point model of the
// algorithm written here. The test also checks the cycle count of a
// transform, the output order, and
// that the pipeline really overlaps RAM reads, multiplications and write-back.
`timescale 1ns/1ps
module tb_fft64_top;
  import fft_pkg::*;
  localparam int unsigned T = 28;                       // default SLOT_CYCLES
  localparam int unsigned EXP_CYC = 65 + 51 * T + 64;   // first sample -> last result

  logic clk = 1'b0, rst_n = 1'b0, in_valid = 1'b0;
  logic signed [IW-1:0] in_data = '0;
  logic busy, out_valid;
  logic [AW-1:0] out_index;
  logic [2*DW-1:0] out_data;

  fft64_top dut (.*);

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  int cycle = 0;
  always @(posedge clk) cycle <= cycle + 1;

  // mechanism counters
  int n_overlap_rd = 0, n_overlap_wr = 0, n_xfer = 0, n_revwrite = 0, n_busneg = 0;
  int load_idx = 0;
  always @(posedge clk) if (rst_n) begin
    if (dut.u_dft4.mult_busy && dut.il_load != 0) n_overlap_rd++;
    if (dut.u_dft4.mult_busy && dut.ol_oe != 0)   n_overlap_wr++;
    if (dut.xfer) n_xfer++;
    if (dut.u_ctrl.state == 2'd1 && !dut.ram_wr_n) begin
      if (dut.ram_addr != AW'(load_idx)) n_revwrite++;
      load_idx = (load_idx + 1) % 64;
    end
    if (dut.ram_src_ol && !dut.ram_wr_n && dut.ol_bus.re[DW-1]) n_busneg++;
  end

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int x [64];
  real got_re [64], got_im [64];
  logic [2*DW-1:0] out_words [64];


  // Bit-exact model of the fixed-point algorithm: digit-reversed load, three
  // in-place radix-4 stages, phase factors rounded to 1/512 (half away from
  // zero), each real product truncated toward zero on magnitudes.
  longint mre [64], mim [64];
  function automatic longint qw(input real v);
    return (v >= 0.0) ? longint'($rtoi(v * 512.0 + 0.5)) : -longint'($rtoi(-v * 512.0 + 0.5));
  endfunction
  function automatic longint rp(input longint a, input longint w);
    longint m;
    m = ((a < 0 ? -a : a) * (w < 0 ? -w : w)) >>> 9;
    return ((a < 0) != (w < 0)) ? -m : m;
  endfunction
  task automatic model;
    for (int n = 0; n < 64; n++) begin
      int r;
      r = (n % 4) * 16 + ((n / 4) % 4) * 4 + n / 16;
      mre[r] = longint'(x[n]) * 1024;
      mim[r] = 0;
    end
    for (int span = 1; span < 64; span *= 4) begin
      for (int base = 0; base < 64; base += 4 * span) begin
        for (int q = 0; q < span; q++) begin
          longint tr [4], ti [4];
          for (int l = 0; l < 4; l++) begin
            int a;
            real th;
            longint wr, wi, dr, di;
            a  = base + q + l * span;
            th = 2.0 * 3.14159265358979 * ((l * q * (64 / (4 * span))) % 64) / 64.0;
            wr = qw($cos(th)); wi = qw(-$sin(th));
            dr = mre[a]; di = mim[a];
            if (l == 0) begin
              tr[l] = dr; ti[l] = di;
            end else begin
              tr[l] = rp(dr, wr) - rp(di, wi);
              ti[l] = rp(dr, wi) + rp(di, wr);
            end
          end
          for (int p = 0; p < 4; p++) begin
            longint sr, si;
            sr = 0; si = 0;
            for (int l = 0; l < 4; l++) begin
              case ((l * p) % 4)
                0: begin sr += tr[l]; si += ti[l]; end
                1: begin sr += ti[l]; si -= tr[l]; end
                2: begin sr -= tr[l]; si -= ti[l]; end
                default: begin sr -= ti[l]; si += tr[l]; end
              endcase
            end
            mre[base + q + p * span] = sr;
            mim[base + q + p * span] = si;
          end
        end
      end
    end
  endtask

  task automatic run(input string name, input real tol_scale, input bit exact);
    int t0, tlast, nout;
    real sabs, tol, er, ei, maxerr;
    sabs = 0.0;
    foreach (x[n]) sabs += (x[n] < 0) ? -x[n] : x[n];
    tol = exact ? 0.0 : tol_scale * sabs + 2.0;
    @(negedge clk);
    for (int n = 0; n < 64; n++) begin
      in_valid = 1'b1;
      in_data  = IW'(x[n]);
      if (n == 0) t0 = cycle;
      @(negedge clk);
    end
    in_valid = 1'b0;
    nout = 0;
    while (nout < 64) begin
      @(posedge clk);
      #1;
      if (out_valid) begin
        checks++;
        if (out_index != AW'(nout)) begin
          failures++;
          $display("%s: result %0d came with index %0d", name, nout, out_index);
        end
        out_words[nout] = out_data;
        got_re[nout] = real'($signed(out_data[2*DW-1:DW])) / 1024.0;
        got_im[nout] = real'($signed(out_data[DW-1:0])) / 1024.0;
        nout++;
        tlast = cycle;
      end
    end
    checks++;
    if (tlast - t0 != EXP_CYC) begin
      failures++;
      $display("%s: transform took %0d cycles, expected %0d", name, tlast - t0, EXP_CYC);
    end
    maxerr = 0.0;
    for (int k = 0; k < 64; k++) begin
      real rr, ri;
      rr = 0.0; ri = 0.0;
      for (int n = 0; n < 64; n++) begin
        rr += x[n] * $cos(2.0 * 3.14159265358979 * ((k * n) % 64) / 64.0);
        ri -= x[n] * $sin(2.0 * 3.14159265358979 * ((k * n) % 64) / 64.0);
      end
      er = got_re[k] - rr; if (er < 0) er = -er;
      ei = got_im[k] - ri; if (ei < 0) ei = -ei;
      if (er > maxerr) maxerr = er;
      if (ei > maxerr) maxerr = ei;
      checks++;
      if (er > tol + 1e-9 || ei > tol + 1e-9) begin
        failures++;
        if (failures < 10)
          $display("%s: X(%0d) = (%f, %f), expected (%f, %f)", name, k, got_re[k], got_im[k], rr, ri);
      end
    end
    model();
    for (int k = 0; k < 64; k++) begin
      checks++;
      if (out_words[k] != {DW'(mre[k]), DW'(mim[k])}) begin
        failures++;
        if (failures < 10)
          $display("%s: X(%0d) = %h, fixed-point model gives %h", name, k, out_words[k], {DW'(mre[k]), DW'(mim[k])});
      end
    end
    $display("%s: %0d cycles, max error %f (tolerance %f)", name, tlast - t0, maxerr, tol);
    repeat (3) @(negedge clk);
  endtask

  initial begin
    repeat (4) @(negedge clk);
    rst_n = 1'b1;
    // impulse: every X(k) = 300 exactly
    foreach (x[n]) x[n] = (n == 0) ? 300 : 0;
    run("impulse", 0.0, 1'b1);
    // full-scale negative constant: X(0) = -512*64, the largest magnitude
    foreach (x[n]) x[n] = -512;
    run("constant", 0.001, 1'b0);
    // cosine at bin 5
    foreach (x[n]) x[n] = int'($rtoi(400.0 * $cos(2.0 * 3.14159265358979 * 5 * n / 64.0)));
    run("cosine", 0.001, 1'b0);
    // random full-range samples
    foreach (x[n]) x[n] = int'($urandom_range(1023)) - 512;
    run("random", 0.001, 1'b0);

    $display("overlap read/mult=%0d write/mult=%0d xfer=%0d digit-reversed writes=%0d negative bus words=%0d",
             n_overlap_rd, n_overlap_wr, n_xfer, n_revwrite, n_busneg);
    checks++; if (n_overlap_rd == 0) begin failures++; $display("reads never overlapped a multiplication"); end
    checks++; if (n_overlap_wr == 0) begin failures++; $display("writes never overlapped a multiplication"); end
    checks++; if (n_xfer != 4 * 51) begin failures++; $display("expected %0d pipeline steps", 4 * 51); end
    checks++; if (n_revwrite == 0) begin failures++; $display("no digit-reversed input write"); end
    checks++; if (n_busneg == 0) begin failures++; $display("no negative result on the OL bus"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
