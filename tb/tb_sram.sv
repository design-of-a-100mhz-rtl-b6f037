// tb_sram: the 64 x 54 static RAM. Writes random words to all rows, reads
// them back in another order (reads are asynchronous), then checks that
// cycles with wr_n high leave the contents alone.
module tb_sram;
  localparam int unsigned WORDS = 64, WIDTH = 54;
  logic clk = 1'b0, wr_n = 1'b1;
  logic [5:0] addr = '0;
  logic [WIDTH-1:0] din = '0, dout;
  logic [WIDTH-1:0] ref_mem [WORDS];
  int checks = 0, failures = 0;
  sram dut (.*);
  always #5 clk = ~clk;
  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  task automatic read_all;
    for (int i = 0; i < WORDS; i++) begin
      @(negedge clk);
      wr_n = 1'b1;
      addr = 6'((i * 37) % WORDS);
      din = {$urandom, $urandom};
      #1;
      checks++;
      if (dout != ref_mem[addr]) begin
        failures++;
        $display("row %0d reads %h, expected %h", addr, dout, ref_mem[addr]);
      end
    end
  endtask
  initial begin
    for (int i = 0; i < WORDS; i++) begin
      @(negedge clk);
      addr = 6'(i); din = {$urandom, $urandom}; wr_n = 1'b0;
      ref_mem[i] = din;
    end
    read_all();
    read_all();
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
