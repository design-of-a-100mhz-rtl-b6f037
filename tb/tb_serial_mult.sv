// tb_serial_mult: the 26 x 10-bit shift-and-add multiplier against integer
// multiplication, including all-ones operands, and its timing: busy must be
// high for exactly 26 cycles after start.
module tb_serial_mult;
  localparam int unsigned NW = 26, MW = 10;
  logic clk = 1'b0, rst_n = 1'b0, start = 1'b0, busy;
  logic [NW-1:0] n_in = '0;
  logic [MW-1:0] m_in = '0;
  logic [NW+MW-1:0] q;
  int checks = 0, failures = 0;
  serial_mult dut (.*);
  always #5 clk = ~clk;
  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  task automatic mul(input logic [NW-1:0] a, input logic [MW-1:0] b);
    int cyc;
    logic [NW+MW-1:0] e;
    @(negedge clk);
    n_in = a; m_in = b; start = 1'b1;
    @(negedge clk);
    start = 1'b0;
    n_in = '1; m_in = '1;   // operands are only sampled at start
    cyc = 0;
    while (busy) begin
      @(negedge clk);
      cyc++;
    end
    e = (NW+MW)'(a) * (NW+MW)'(b);
    checks += 2;
    if (cyc != NW) begin
      failures++;
      $display("busy for %0d cycles after the start cycle, expected %0d", cyc, NW);
    end
    if (q != e) begin
      failures++;
      $display("%0d * %0d = %0d, expected %0d", a, b, q, e);
    end
  endtask
  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    mul('1, '1);
    mul(NW'(1), MW'(512));
    mul('0, '1);
    for (int i = 0; i < 100; i++) mul(NW'($urandom), MW'($urandom));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
