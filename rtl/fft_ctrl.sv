// fft_ctrl: controller of the 64-point FFT processor. It runs the five
// phases of an operation: (1) write the 64 input samples to RAM, (2) read
// four words, (3) compute their 4-point DFT and write the results back,
// (4) repeat for 48 butterflies (3 radix-4 stages of 16), (5) read the 64
// results out.
//
// Loading: each accepted sample is latched in IB and written one cycle later
// at the base-4 digit-reversed address of its index n, so that the three
// in-place stages leave X(k) at address k.
//
// Computing: butterfly g (stage s = g/16, j = g%16, span S = 4**s) works on
// the RAM words b + q + l*S, l = 0..3, with q = j % S and b = (j / S)*4S, and
// uses W-ROM address q*16/S. Each butterfly owns a slot of SLOT_CYCLES
// cycles. In slot t the controller reads butterfly t's four words into IL
// (cycles 0..3, lane order F0,F2,F1,F3), writes the four OL results of
// butterfly t-3 back in place (cycles 4..7), and pulses xfer in the last
// cycle, while the multipliers work on butterfly t-1 and NL holds t-2. 51
// slots cover all 48 butterflies. No butterfly reads a word that is still in
// flight: the nearest dependency is four butterflies back.
//
// Output: the RAM is read at k = 0..63, one word per cycle, into the OB
// buffer; out_valid and out_index come one cycle after the read.
// The phases follow the original design; the slot scheme, digit-reversed loading,
// the valid strobes and SLOT_CYCLES are this design's choices.
module fft_ctrl
  import fft_pkg::*;
#(
  parameter int unsigned SLOT_CYCLES = 28
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             in_valid,
  output logic             ib_load,
  output logic [AW-1:0]    ram_addr,
  output logic             ram_wr_n,
  output logic             ram_src_ol,
  output logic [3:0]       il_load,
  output logic             xfer,
  output logic [3:0]       ol_oe,
  output logic [ROMAW-1:0] rom_addr,
  output logic             ob_load,
  output logic             busy,
  output logic             out_valid,
  output logic [AW-1:0]    out_index
);
  localparam int unsigned NBF    = (N / 4) * LOG4N;  // 48 butterflies
  localparam int unsigned NSLOT  = NBF + 3;          // plus pipeline drain
  localparam int unsigned SCW    = $clog2(SLOT_CYCLES);

  typedef enum logic [1:0] {S_IDLE, S_LOAD, S_COMP, S_OUT} state_t;
  state_t state;

  logic [AW:0]     in_cnt;    // samples accepted
  logic [AW:0]     wr_cnt;    // samples written
  logic            ib_full;   // IB holds a sample not yet written
  logic [5:0]      slot;      // 0..NSLOT-1
  logic [SCW-1:0]  cyc;       // 0..SLOT_CYCLES-1
  logic [AW:0]     rd_cnt;    // results read out

  // base-4 digit reversal of a 6-bit index
  function automatic logic [AW-1:0] rev4(input logic [AW-1:0] n);
    return {n[1:0], n[3:2], n[5:4]};
  endfunction

  // RAM address of lane word l of butterfly g
  function automatic logic [AW-1:0] bf_addr(input logic [5:0] g, input logic [1:0] l);
    logic [1:0] s;
    logic [3:0] j;
    logic [AW-1:0] span, q, grp;
    s    = 2'(g / 16);
    j    = 4'(g % 16);
    span = AW'(1) << (2 * s);
    q    = AW'(j) % span;
    grp  = AW'(j) / span;
    return AW'((grp * span) << 2) + q + AW'(AW'(l) * span);
  endfunction

  function automatic logic [ROMAW-1:0] bf_rom(input logic [5:0] g);
    logic [1:0] s;
    logic [3:0] j;
    logic [AW-1:0] span, q;
    s    = 2'(g / 16);
    j    = 4'(g % 16);
    span = AW'(1) << (2 * s);
    q    = AW'(j) % span;
    return ROMAW'(q * (AW'(16) / span));
  endfunction

  // lane l of the processor carries F(lane_f[l]) : order 0, 2, 1, 3
  function automatic logic [1:0] lane_f(input logic [1:0] l);
    return {l[0], l[1]};
  endfunction

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      state     <= S_IDLE;
      in_cnt    <= '0;
      wr_cnt    <= '0;
      ib_full   <= 1'b0;
      slot      <= '0;
      cyc       <= '0;
      rd_cnt    <= '0;
      out_valid <= 1'b0;
      out_index <= '0;
    end else begin
      out_valid <= ob_load;
      out_index <= AW'(rd_cnt);
      ib_full   <= ib_load;
      if (ib_load) in_cnt <= in_cnt + 1'b1;
      unique case (state)
        S_IDLE: begin
          in_cnt <= ib_load ? (AW+1)'(1) : '0;
          wr_cnt <= '0;
          if (ib_load) state <= S_LOAD;
        end
        S_LOAD: begin
          if (ib_full) begin
            wr_cnt <= wr_cnt + 1'b1;
            if (wr_cnt == (AW+1)'(N - 1)) begin
              state <= S_COMP;
              slot  <= '0;
              cyc   <= '0;
            end
          end
        end
        S_COMP: begin
          if (cyc == SCW'(SLOT_CYCLES - 1)) begin
            cyc <= '0;
            if (slot == 6'(NSLOT - 1)) begin
              state  <= S_OUT;
              rd_cnt <= '0;
            end else begin
              slot <= slot + 1'b1;
            end
          end else begin
            cyc <= cyc + 1'b1;
          end
        end
        S_OUT: begin
          rd_cnt <= rd_cnt + 1'b1;
          if (rd_cnt == (AW+1)'(N - 1)) state <= S_IDLE;
        end
        default: state <= S_IDLE;
      endcase
    end
  end

  logic rd_phase, wr_phase;
  logic [1:0] lane;
  logic [5:0] wr_bf;

  always_comb begin
    ib_load    = in_valid && (state == S_IDLE || (state == S_LOAD && in_cnt < (AW+1)'(N)));
    ram_addr   = '0;
    ram_wr_n   = 1'b1;
    ram_src_ol = 1'b0;
    il_load    = '0;
    ol_oe      = '0;
    xfer       = 1'b0;
    ob_load    = 1'b0;
    rom_addr   = '0;
    rd_phase   = 1'b0;
    wr_phase   = 1'b0;
    lane       = cyc[1:0];
    wr_bf      = slot - 6'd3;
    unique case (state)
      S_LOAD: begin
        ram_addr = rev4(wr_cnt[AW-1:0]);
        ram_wr_n = ~ib_full;
      end
      S_COMP: begin
        rd_phase = (cyc < SCW'(4)) && (slot < 6'(NBF));
        wr_phase = (cyc >= SCW'(4)) && (cyc < SCW'(8)) && (slot >= 6'd3);
        rom_addr = (slot < 6'(NBF)) ? bf_rom(slot) : '0;
        xfer     = (cyc == SCW'(SLOT_CYCLES - 1));
        if (rd_phase) begin
          ram_addr      = bf_addr(slot, lane_f(lane));
          il_load[lane] = 1'b1;
        end
        if (wr_phase) begin
          ram_addr        = bf_addr(wr_bf, lane);
          ram_wr_n        = 1'b0;
          ram_src_ol      = 1'b1;
          ol_oe[lane]     = 1'b1;
        end
      end
      S_OUT: begin
        ram_addr = rd_cnt[AW-1:0];
        ob_load  = 1'b1;
      end
      default: ;
    endcase
  end

  assign busy = (state != S_IDLE);

  initial assert (SLOT_CYCLES >= MAGW + 2 && SLOT_CYCLES >= 8)
    else $error("SLOT_CYCLES too short for the serial multipliers");
endmodule
