// ol_latch: output latch of the 4-point DFT processor, with a load enable and
// an output enable, driving the shared 54-bit bus back to the RAM. The
// original design makes this a tri-state latch; here the output is gated: q shows
// the stored word while oe is high and zero otherwise, and drive = oe, so the
// bus is the OR of all OL outputs. Whoever owns the bus must enable at most
// one OL at a time. Load is synchronous, reset clears the stored word.
module ol_latch #(
  parameter int unsigned W = 54
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         load,
  input  logic         oe,
  input  logic [W-1:0] d,
  output logic         drive,
  output logic [W-1:0] q
);
  logic [W-1:0] r;
  always_ff @(posedge clk) begin
    if (!rst_n)    r <= '0;
    else if (load) r <= d;
  end
  assign drive = oe;
  assign q     = oe ? r : '0;
endmodule
