// w_rom: phase factor ROM, 16 words of 22 bits. Word a holds
//   W64^(EXP*a) = cos(2*pi*EXP*a/64) - j sin(2*pi*EXP*a/64)
// with each part as a sign bit and a 10-bit magnitude, 1.0 = 512.
// The magnitudes come from a quarter-wave table
//   C(k) = round(512 * cos(pi*k/32)),  k = 0..16,
// and the quadrant of EXP*a mod 64 picks entries and signs. The processor
// has three of these ROMs; the one on the lane carrying F(l,q) uses EXP = l,
// so addresses 0..15 give W64^(lq) for the first stage, addresses 4q give the
// 16-point factors of the second stage and address 0 gives 1 for the third.
// The 16-word, 22-bit size follows the original design; the number format and the
// way the contents are generated are this design's choice. Combinational.
module w_rom
  import fft_pkg::*;
#(
  parameter int unsigned EXP = 1
) (
  input  logic [ROMAW-1:0] addr,
  output tw_t              w
);
  function automatic logic [WMW-1:0] cmag(input logic [4:0] k);
    case (k)
      5'd0:  return 10'd512;
      5'd1:  return 10'd510;
      5'd2:  return 10'd502;
      5'd3:  return 10'd490;
      5'd4:  return 10'd473;
      5'd5:  return 10'd452;
      5'd6:  return 10'd426;
      5'd7:  return 10'd396;
      5'd8:  return 10'd362;
      5'd9:  return 10'd325;
      5'd10: return 10'd284;
      5'd11: return 10'd241;
      5'd12: return 10'd196;
      5'd13: return 10'd149;
      5'd14: return 10'd100;
      5'd15: return 10'd50;
      default: return 10'd0;
    endcase
  endfunction

  logic [5:0] e;
  logic [4:0] r, r_c;
  logic       cos_s, sin_s;
  logic [WMW-1:0] cos_m, sin_m;

  always_comb begin
    e   = 6'((EXP * 32'(addr)) % 64);
    r   = {1'b0, e[3:0]};
    r_c = 5'd16 - r;
    unique case (e[5:4])
      2'd0: begin cos_s = 1'b0; cos_m = cmag(r);   sin_s = 1'b0; sin_m = cmag(r_c); end
      2'd1: begin cos_s = 1'b1; cos_m = cmag(r_c); sin_s = 1'b0; sin_m = cmag(r);   end
      2'd2: begin cos_s = 1'b1; cos_m = cmag(r);   sin_s = 1'b1; sin_m = cmag(r_c); end
      default: begin cos_s = 1'b0; cos_m = cmag(r_c); sin_s = 1'b1; sin_m = cmag(r); end
    endcase
    w.re_s = cos_s;
    w.re_m = cos_m;
    w.im_s = ~sin_s;  // W = cos - j sin
    w.im_m = sin_m;
  end
endmodule
