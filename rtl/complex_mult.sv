// complex_mult: multiplies a complex data word (27-bit two's complement parts,
// 10 fraction bits) by a phase factor (sign + 10-bit magnitude parts,
// 1.0 = 512). Multiplication is done on magnitudes and the sign of each real
// product is the xor of the operand signs, as the original design describes. The
// data magnitudes go into 26-bit shift registers (the ML latch), the phase
// factor into the R register; four serial multipliers form re*Wre, im*Wim,
// re*Wim and im*Wre in parallel, 26 cycles after start. Each product is cut
// back by 9 bits (truncation toward zero), negated when its sign says so,
// and the pairs are added:
//   p.re = d.re*W.re - d.im*W.im,   p.im = d.re*W.im + d.im*W.re.
// Timing: start loads the operands; busy is high for 26 cycles; p is valid
// after busy falls and stays until the next start. Running four multipliers
// in parallel and the truncation are this design's choices. Data parts must
// stay above -2**26 (their magnitude must fit 26 bits), which the 17-bit
// integer range of a 64-point transform of 10-bit samples guarantees.
module complex_mult
  import fft_pkg::*;
(
  input  logic  clk,
  input  logic  rst_n,
  input  logic  start,
  input  cplx_t d,
  input  tw_t   w,
  output logic  busy,
  output cplx_t p
);
  localparam int unsigned PW = MAGW + WMW;

  dword_t re_neg, im_neg;
  logic [MAGW-1:0] mag_re, mag_im;
  twos_comp #(.W(DW)) u_abs_re (.d(d.re), .neg(re_neg));
  twos_comp #(.W(DW)) u_abs_im (.d(d.im), .neg(im_neg));
  // |d| fits MAGW bits for every value above -2**MAGW; the top bit is dropped
  assign mag_re = MAGW'(d.re[DW-1] ? re_neg : d.re);
  assign mag_im = MAGW'(d.im[DW-1] ? im_neg : d.im);

  // operand signs latched with the operands; the phase factor magnitudes
  // are held in the multipliers' M registers (together the R register)
  logic ds_re, ds_im, ws_re, ws_im;
  always_ff @(posedge clk) begin
    if (!rst_n) begin
      ds_re <= 1'b0;
      ds_im <= 1'b0;
      ws_re <= 1'b0;
      ws_im <= 1'b0;
    end else if (start) begin
      ds_re <= d.re[DW-1];
      ds_im <= d.im[DW-1];
      ws_re <= w.re_s;
      ws_im <= w.im_s;
    end
  end

  logic [PW-1:0] q_rr, q_ii, q_ri, q_ir;
  logic [3:0]    b;
  serial_mult #(.NW(MAGW), .MW(WMW)) u_rr (.clk, .rst_n, .start, .n_in(mag_re), .m_in(w.re_m), .busy(b[0]), .q(q_rr));
  serial_mult #(.NW(MAGW), .MW(WMW)) u_ii (.clk, .rst_n, .start, .n_in(mag_im), .m_in(w.im_m), .busy(b[1]), .q(q_ii));
  serial_mult #(.NW(MAGW), .MW(WMW)) u_ri (.clk, .rst_n, .start, .n_in(mag_re), .m_in(w.im_m), .busy(b[2]), .q(q_ri));
  serial_mult #(.NW(MAGW), .MW(WMW)) u_ir (.clk, .rst_n, .start, .n_in(mag_im), .m_in(w.re_m), .busy(b[3]), .q(q_ir));
  assign busy = |b;

  // scale back to the data format and apply the product signs;
  // the d.im*W.im term enters negated, so its sign is inverted
  dword_t t_rr, t_ii, t_ri, t_ir, n_rr, n_ii, n_ri, n_ir, s_rr, s_ii, s_ri, s_ir;
  assign t_rr = DW'(q_rr >> WSHIFT);
  assign t_ii = DW'(q_ii >> WSHIFT);
  assign t_ri = DW'(q_ri >> WSHIFT);
  assign t_ir = DW'(q_ir >> WSHIFT);
  twos_comp #(.W(DW)) u_n_rr (.d(t_rr), .neg(n_rr));
  twos_comp #(.W(DW)) u_n_ii (.d(t_ii), .neg(n_ii));
  twos_comp #(.W(DW)) u_n_ri (.d(t_ri), .neg(n_ri));
  twos_comp #(.W(DW)) u_n_ir (.d(t_ir), .neg(n_ir));
  assign s_rr = (ds_re ^ ws_re)  ? n_rr : t_rr;
  assign s_ii = ~(ds_im ^ ws_im) ? n_ii : t_ii;
  assign s_ri = (ds_re ^ ws_im)  ? n_ri : t_ri;
  assign s_ir = (ds_im ^ ws_re)  ? n_ir : t_ir;

  ripple_adder #(.W(DW)) u_add_re (.a(s_rr), .b(s_ii), .cin(1'b0), .s(p.re));
  ripple_adder #(.W(DW)) u_add_im (.a(s_ri), .b(s_ir), .cin(1'b0), .s(p.im));
endmodule
