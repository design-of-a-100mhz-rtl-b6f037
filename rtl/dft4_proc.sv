// dft4_proc: the 4-point DFT processor, a radix-4 decimation-in-time
// butterfly in four latch stages:
//   IL  four input latches, loaded one at a time from the RAM output bus;
//   ML  lane 0 is a plain latch, lanes 1..3 are the input shift registers of
//       three complex multipliers, each with its phase-factor ROM;
//   NL  latches holding the (twiddled) butterfly inputs;
//   COU the combinational 4-point DFT, feeding
//   OL  four output latches that take turns driving the 54-bit bus to RAM.
// Lane order is F(0,q), F(2,q), F(1,q), F(3,q): W-ROM 1 (lane 1) holds
// W^(2q), W-ROM 2 holds W^q, W-ROM 3 holds W^(3q), and OL p receives X(p,q).
// One xfer pulse advances the whole pipeline at once: ML <- IL (and the
// multipliers start), NL <- products, OL <- COU(NL). The multipliers need 26
// cycles, so xfer pulses must be at least 27 cycles apart; an assertion
// checks that no xfer arrives while they are busy. Lane order, latch names
// and the pipeline follow the original design; the single xfer strobe is this
// design's choice.
module dft4_proc
  import fft_pkg::*;
(
  input  logic             clk,
  input  logic             rst_n,
  input  cplx_t            bus_in,
  input  logic [3:0]       il_load,
  input  logic             xfer,
  input  logic [ROMAW-1:0] rom_addr,
  input  logic [3:0]       ol_oe,
  output cplx_t            bus_out,
  output logic             mult_busy
);
  cplx_t il [4];
  cplx_t nl_in [4];
  cplx_t nl [4];
  cplx_t cou_y [4];
  cplx_t ol_q [4];
  logic [3:0] ol_drv;
  logic [2:0] mb;

  for (genvar i = 0; i < 4; i++) begin : g_il
    latch_reg #(.W(2*DW)) u_il (.clk, .rst_n, .load(il_load[i]), .d(bus_in), .q(il[i]));
  end

  // lane 0: W^0 = 1, plain ML latch
  latch_reg #(.W(2*DW)) u_ml0 (.clk, .rst_n, .load(xfer), .d(il[0]), .q(nl_in[0]));

  // lanes 1..3: phase factor ROM and complex multiplier
  localparam int unsigned LANE_EXP [3] = '{2, 1, 3};
  for (genvar i = 1; i < 4; i++) begin : g_mul
    tw_t w;
    w_rom #(.EXP(LANE_EXP[i-1])) u_rom (.addr(rom_addr), .w(w));
    complex_mult u_cm (
      .clk, .rst_n, .start(xfer), .d(il[i]), .w(w), .busy(mb[i-1]), .p(nl_in[i])
    );
  end
  assign mult_busy = |mb;

  for (genvar i = 0; i < 4; i++) begin : g_nl
    latch_reg #(.W(2*DW)) u_nl (.clk, .rst_n, .load(xfer), .d(nl_in[i]), .q(nl[i]));
  end

  cou u_cou (.x0(nl[0]), .x2(nl[1]), .x1(nl[2]), .x3(nl[3]), .y(cou_y));

  for (genvar i = 0; i < 4; i++) begin : g_ol
    ol_latch #(.W(2*DW)) u_ol (
      .clk, .rst_n, .load(xfer), .oe(ol_oe[i]), .d(cou_y[i]), .drive(ol_drv[i]), .q(ol_q[i])
    );
  end

  assign bus_out = ol_q[0] | ol_q[1] | ol_q[2] | ol_q[3];

  a_one_driver: assert property (@(posedge clk) disable iff (!rst_n) $onehot0(ol_drv))
    else $error("more than one OL latch drives the bus");
  a_mult_done: assert property (@(posedge clk) disable iff (!rst_n) xfer |-> !mult_busy)
    else $error("pipeline advanced while the multipliers were busy");
endmodule
