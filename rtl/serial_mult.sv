// serial_mult: unsigned shift-and-add multiplier, q = n_in * m_in.
// The multiplier sits in shift register N, the multiplicand in register M and
// the product builds up in shift register Q. Each cycle the LSB of N gates M
// (the AND stage), a parallel adder adds the result to the upper MW bits of
// Q, and Q and N shift right by one. After NW cycles Q holds the full
// NW+MW-bit product. This follows the original design's multiplier block diagram.
// Timing: a one-cycle start pulse loads N and M and clears Q; busy is then
// high for exactly NW cycles and q is valid from the cycle busy falls until
// the next start. The cycle counter is this design's addition.
module serial_mult #(
  parameter int unsigned NW = 26,
  parameter int unsigned MW = 10
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             start,
  input  logic [NW-1:0]    n_in,
  input  logic [MW-1:0]    m_in,
  output logic             busy,
  output logic [NW+MW-1:0] q
);
  localparam int unsigned CW = $clog2(NW + 1);

  logic [NW-1:0]    n_sr;
  logic [MW-1:0]    m_r;
  logic [NW+MW-1:0] q_sr;
  logic [CW-1:0]    cnt;
  logic [MW-1:0]    partial;
  logic [MW:0]      sum;

  // AND stage and parallel adder (carry out kept as the new top bit)
  assign partial = n_sr[0] ? m_r : '0;
  ripple_adder #(.W(MW + 1)) u_add (
    .a({1'b0, q_sr[NW+MW-1:NW]}), .b({1'b0, partial}), .cin(1'b0), .s(sum)
  );

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      n_sr <= '0;
      m_r  <= '0;
      q_sr <= '0;
      cnt  <= '0;
    end else if (start) begin
      n_sr <= n_in;
      m_r  <= m_in;
      q_sr <= '0;
      cnt  <= CW'(NW);
    end else if (cnt != '0) begin
      q_sr <= {sum, q_sr[NW-1:1]};
      n_sr <= n_sr >> 1;
      cnt  <= cnt - 1'b1;
    end
  end

  assign busy = (cnt != '0);
  assign q    = q_sr;
endmodule
