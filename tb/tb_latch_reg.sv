// tb_latch_reg: the load-enabled latch: reset clears it, load takes the
// input at the clock edge, and without load it holds.
module tb_latch_reg;
  localparam int unsigned W = 54;
  logic clk = 1'b0, rst_n = 1'b0, load = 1'b0;
  logic [W-1:0] d = '1, q, model;
  int checks = 0, failures = 0;
  latch_reg dut (.*);
  always #5 clk = ~clk;
  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    @(negedge clk);
    @(negedge clk);
    model = '0;
    checks++;
    if (q != model) begin failures++; $display("reset: q = %h", q); end
    rst_n = 1'b1;
    for (int i = 0; i < 300; i++) begin
      d = {$urandom, $urandom};
      load = 1'($urandom);
      @(negedge clk);
      if (load) model = d;
      checks++;
      if (q != model) begin
        failures++;
        $display("q = %h, expected %h", q, model);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
