// tb_fft_ctrl: the controller, checked cycle by cycle against a schedule
// written out here: input writes at base-4 digit-reversed addresses (with a
// gap in the input stream and surplus samples that must be refused), then 51
// slots of SLOT_CYCLES cycles with four IL reads (lane order F0, F2, F1, F3),
// four OL write-backs of the butterfly three slots back, the W-ROM address
// and one xfer per slot, then 64 result reads with out_valid/out_index one
// cycle later. Also checks the total number of cycles.
module tb_fft_ctrl;
  import fft_pkg::*;
  localparam int unsigned T = 28;
  logic clk = 1'b0, rst_n = 1'b0, in_valid = 1'b0;
  logic ib_load, ram_wr_n, ram_src_ol, xfer, ob_load, busy, out_valid;
  logic [AW-1:0] ram_addr, out_index;
  logic [3:0] il_load, ol_oe;
  logic [ROMAW-1:0] rom_addr;
  int checks = 0, failures = 0;
  fft_ctrl dut (.*);
  always #5 clk = ~clk;
  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic fail(input string msg);
    failures++;
    if (failures < 20) $display("%s", msg);
  endtask

  // butterfly t: address of F(l) and W-ROM address
  function automatic int f_addr(input int t, input int l);
    int s, j;
    s = t / 16; j = t % 16;
    case (s)
      0: return 4 * j + l;
      1: return 16 * (j / 4) + (j % 4) + 4 * l;
      default: return j + 16 * l;
    endcase
  endfunction
  function automatic int f_rom(input int t);
    int s, j;
    s = t / 16; j = t % 16;
    case (s)
      0: return 0;
      1: return 4 * (j % 4);
      default: return j;
    endcase
  endfunction

  initial begin
    int n, wr_seen, c, t, cy, lane_f [4];
    lane_f = '{0, 2, 1, 3};
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    @(negedge clk);
    checks++; if (busy) fail("busy after reset");
    // load: 70 samples offered with a gap; 64 accepted, each written next cycle
    n = 0; wr_seen = 0;
    for (int i = 0; i < 72; i++) begin
      in_valid = (i != 10 && i != 11 && i < 70);
      #1;
      checks++;
      if (ib_load != (in_valid && n < 64)) fail($sformatf("ib_load=%b at offer %0d", ib_load, i));
      if (!ram_wr_n) begin
        int e;
        e = (wr_seen % 4) * 16 + ((wr_seen / 4) % 4) * 4 + wr_seen / 16;
        checks++;
        if (int'(ram_addr) != e || ram_src_ol) fail($sformatf("sample %0d written at %0d, expected %0d", wr_seen, ram_addr, e));
        wr_seen++;
      end
      if (ib_load) n++;
      @(negedge clk);
      if (wr_seen == 64) break;
    end
    in_valid = 1'b0;
    checks++; if (wr_seen != 64) fail($sformatf("%0d samples written", wr_seen));
    // compute: cycle-exact schedule
    c = 0;
    for (t = 0; t < 51; t++) begin
      for (cy = 0; cy < int'(T); cy++) begin
        logic [3:0] e_il, e_oe;
        int e_addr;
        bit e_wr;
        #1;
        e_il = '0; e_oe = '0; e_wr = 0; e_addr = -1;
        if (cy < 4 && t < 48) begin e_il[cy] = 1'b1; e_addr = f_addr(t, lane_f[cy]); end
        if (cy >= 4 && cy < 8 && t >= 3) begin e_oe[cy-4] = 1'b1; e_wr = 1; e_addr = f_addr(t - 3, cy - 4); end
        checks++;
        if (il_load != e_il || ol_oe != e_oe || (!ram_wr_n) != e_wr || ram_src_ol != e_wr ||
            (e_addr >= 0 && int'(ram_addr) != e_addr) || xfer != (cy == int'(T) - 1) ||
            int'(rom_addr) != ((t < 48) ? f_rom(t) : 0) || !busy || ob_load)
          fail($sformatf("slot %0d cycle %0d: il=%b oe=%b wr_n=%b addr=%0d (exp %0d) xfer=%b rom=%0d (exp %0d)",
                         t, cy, il_load, ol_oe, ram_wr_n, ram_addr, e_addr, xfer, rom_addr, f_rom(t)));
        @(negedge clk);
      end
    end
    // output
    for (int k = 0; k < 65; k++) begin
      #1;
      checks++;
      if (k < 64 && (!ob_load || int'(ram_addr) != k || !ram_wr_n)) fail($sformatf("read %0d: ob_load=%b addr=%0d", k, ob_load, ram_addr));
      if (k == 64 && ob_load) fail("read past the last result");
      if (k > 0 && (!out_valid || int'(out_index) != k - 1)) fail($sformatf("out_valid=%b index=%0d, expected %0d", out_valid, out_index, k - 1));
      @(negedge clk);
    end
    #1;
    checks++; if (busy || out_valid) fail("still busy after the readout");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
