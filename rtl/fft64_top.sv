// fft64_top: 64-point radix-4 FFT processor. Three blocks: a 64 x 54-bit
// static RAM, the 4-point DFT processor (phase-factor ROMs, three serial
// complex multipliers, the COU adder network and the IL/ML/NL/OL latches)
// and the controller. Samples pass through the IB input latch into RAM;
// butterfly results return to RAM over the OL bus; results leave through the
// OB output buffer.
//
// Interface: after reset, present 64 real 10-bit two's complement samples
// x(0..63) on in_data with in_valid high (gaps allowed; the first sample
// starts a transform and busy rises). When the transform is done the 64
// results X(k) come out in order k = 0..63, one per cycle, with out_valid
// high and k on out_index. out_data = {re, im}, 27-bit two's complement
// parts with 10 fraction bits, unscaled: X(k) = sum x(n) W64^(kn).
// Timing with SLOT_CYCLES = 28: 64 cycles to load (plus one), 51 slots of 28
// cycles for the 48 butterflies, 64 cycles to read out: 1558 cycles, 15.6 us
// at 100 MHz.
module fft64_top
  import fft_pkg::*;
#(
  parameter int unsigned SLOT_CYCLES = 28
) (
  input  logic               clk,
  input  logic               rst_n,
  input  logic               in_valid,
  input  logic signed [IW-1:0] in_data,
  output logic               busy,
  output logic               out_valid,
  output logic [AW-1:0]      out_index,
  output logic [2*DW-1:0]    out_data
);
  logic             ib_load, ram_wr_n, ram_src_ol, xfer, ob_load;
  logic [AW-1:0]    ram_addr;
  logic [3:0]       il_load, ol_oe;
  logic [ROMAW-1:0] rom_addr;
  logic [IW-1:0]    ib_q;
  cplx_t            ib_word, ram_din, ram_dout, ol_bus;

  fft_ctrl #(.SLOT_CYCLES(SLOT_CYCLES)) u_ctrl (
    .clk, .rst_n, .in_valid, .ib_load, .ram_addr, .ram_wr_n, .ram_src_ol,
    .il_load, .xfer, .ol_oe, .rom_addr, .ob_load, .busy, .out_valid, .out_index
  );

  // IB: input latch on the external bus
  latch_reg #(.W(IW)) u_ib (.clk, .rst_n, .load(ib_load), .d(in_data), .q(ib_q));

  // a real sample as a complex data word: integer part, zero fraction
  always_comb begin
    ib_word.re = {{(DW-IW-FRAC){ib_q[IW-1]}}, ib_q, {FRAC{1'b0}}};
    ib_word.im = '0;
  end

  assign ram_din = ram_src_ol ? ol_bus : ib_word;

  sram #(.WORDS(N), .WIDTH(2*DW)) u_ram (
    .clk, .addr(ram_addr), .wr_n(ram_wr_n), .din(ram_din), .dout(ram_dout)
  );

  dft4_proc u_dft4 (
    .clk, .rst_n, .bus_in(ram_dout), .il_load, .xfer, .rom_addr, .ol_oe,
    .bus_out(ol_bus), .mult_busy()
  );

  // OB: output buffer onto the external bus
  latch_reg #(.W(2*DW)) u_ob (.clk, .rst_n, .load(ob_load), .d(ram_dout), .q(out_data));
endmodule
