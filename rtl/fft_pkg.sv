// fft_pkg: word formats shared by the 64-point radix-4 FFT processor.
//
// Data words are complex, 27 bits per part, two's complement, with 10 fraction
// bits (17 integer bits including the sign). A complex word is 54 bits,
// {re, im}, which is the width of the RAM rows and of the OL bus.
// Phase factors are 22 bits: each part is a sign bit plus a 10-bit magnitude
// scaled so that 1.0 = 512. The 27/10/54/22-bit widths follow the original design;
// the sign-magnitude coding and the 1.0 = 512 scale are this design's choice.
package fft_pkg;
  localparam int unsigned N        = 64;  // transform length
  localparam int unsigned LOG4N    = 3;   // radix-4 stages
  localparam int unsigned IW       = 10;  // input sample width
  localparam int unsigned DW       = 27;  // data part width
  localparam int unsigned FRAC     = 10;  // data fraction bits
  localparam int unsigned MAGW     = DW - 1;  // data magnitude width (26)
  localparam int unsigned WMW      = 10;  // phase factor magnitude width
  localparam int unsigned WSHIFT   = 9;   // phase factor scale: 1.0 = 2**WSHIFT
  localparam int unsigned AW       = 6;   // RAM address width
  localparam int unsigned ROMAW    = 4;   // W-ROM address width (16 words)

  typedef logic signed [DW-1:0] dword_t;

  typedef struct packed {
    dword_t re;
    dword_t im;
  } cplx_t;

  typedef struct packed {
    logic           re_s;
    logic [WMW-1:0] re_m;
    logic           im_s;
    logic [WMW-1:0] im_m;
  } tw_t;
endpackage
