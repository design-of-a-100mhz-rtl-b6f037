// latch_reg: W-bit data latch with a load enable, used for the IB input
// latch, the IL and NL latch groups, ML0 and the OB output buffer. q takes d
// at the clock edge when load is high and holds otherwise; synchronous
// active-low reset clears it. The original design builds its latches from clocked
// inverters; here they are edge-triggered registers, a synchronous-design
// choice.
module latch_reg #(
  parameter int unsigned W = 54
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         load,
  input  logic [W-1:0] d,
  output logic [W-1:0] q
);
  always_ff @(posedge clk) begin
    if (!rst_n)    q <= '0;
    else if (load) q <= d;
  end
endmodule
