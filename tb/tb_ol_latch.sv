// tb_ol_latch: the OL output latch: loads on load, shows its word only while
// oe is high (zero otherwise, so several can share an OR bus), drive = oe.
module tb_ol_latch;
  localparam int unsigned W = 54;
  logic clk = 1'b0, rst_n = 1'b0, load = 1'b0, oe = 1'b0, drive;
  logic [W-1:0] d = '1, q, model;
  int checks = 0, failures = 0;
  ol_latch dut (.*);
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
    rst_n = 1'b1;
    model = '0;
    for (int i = 0; i < 300; i++) begin
      d = {$urandom, $urandom};
      load = 1'($urandom);
      @(negedge clk);
      if (load) model = d;
      oe = 1'($urandom);
      #1;
      checks++;
      if (q != (oe ? model : '0) || drive != oe) begin
        failures++;
        $display("oe=%b q = %h, expected %h", oe, q, oe ? model : '0);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
