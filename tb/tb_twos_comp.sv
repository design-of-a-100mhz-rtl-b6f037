// tb_twos_comp: 27-bit two's complement circuit against integer negation.
module tb_twos_comp;
  localparam int unsigned W = 27;
  logic [W-1:0] d, neg;
  int checks = 0, failures = 0;
  twos_comp dut (.*);
  task automatic check;
    #1;
    checks++;
    if (neg != W'(0 - d)) begin
      failures++;
      $display("-%h = %h, expected %h", d, neg, W'(0 - d));
    end
  endtask
  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    d = '0; check();
    d = W'(1); check();
    d = '1; check();
    for (int i = 0; i < 500; i++) begin
      d = W'($urandom);
      check();
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
