// tb_ripple_adder: 27-bit ripple adder against modular integer addition, with
// random operands, carry-in, and the longest carry chain (all ones plus one).
module tb_ripple_adder;
  localparam int unsigned W = 27;
  logic [W-1:0] a, b, s;
  logic cin;
  int checks = 0, failures = 0;
  ripple_adder dut (.*);
  task automatic check;
    logic [W:0] e;
    #1;
    e = {1'b0, a} + {1'b0, b} + (W+1)'(cin);
    checks++;
    if (s != e[W-1:0]) begin
      failures++;
      $display("%h + %h + %b = %h, expected %h", a, b, cin, s, e[W-1:0]);
    end
  endtask
  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    a = '1; b = W'(1); cin = 1'b0; check();
    a = '1; b = '0;    cin = 1'b1; check();
    a = '1; b = '1;    cin = 1'b1; check();
    for (int i = 0; i < 500; i++) begin
      a = W'($urandom); b = W'($urandom); cin = 1'($urandom);
      check();
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
