// Accumulator of the quaternary squarer.
//
// Each iteration's sum S_i = T1+T2+T3 weighs 16^i in the final square, but
// S_i is wider than the two radix-4 digits the iteration retires. The
// accumulator therefore adds S_i to the part of the previous total that was
// not yet retired (its upper 2n-1 bits, kept in carry_q), sends the low 4
// bits (two result digits) to the result shift register and keeps the upper
// 2n-1 bits for the next iteration, as in the datapath figure (2n+3 bits in,
// 4 bits out, 2n-1 bits fed back). The bound S_i + carry < 6.5 * 4^n keeps
// the total within 2n+3 bits and the carry within 2n-1 bits.
//
// Timing: digits is combinational from addend; carry_q is updated on the
// clock edge when en = 1. clear (first iteration) makes the old carry read
// as zero, so back-to-back squarings need no idle cycle.
module sq4_accumulator #(
  parameter int unsigned N = 64       // squarand width nm = 2n bits
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         clear,
  input  logic         en,
  input  logic [N+2:0] addend,        // 2n+3-bit iteration sum
  output logic [3:0]   digits         // two radix-4 result digits
);

  logic [N-2:0] carry_q;              // 2n-1 bits not yet retired
  logic [N-2:0] carry_in;
  logic [N+2:0] total;

  assign carry_in = clear ? '0 : carry_q;
  assign total    = addend + {4'b0000, carry_in};
  assign digits   = total[3:0];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)  carry_q <= '0;
    else if (en) carry_q <= total[N+2:4];
  end

endmodule
