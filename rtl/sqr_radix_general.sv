// General radix-2^M digit-serial squarer, one algorithm step per clock.
//
// The squarand alpha (N = n*M bits) is read as n digits of radix beta = 2^M.
// With a0 its low digit, A = alpha - a0 and the residual r = a0 - beta/2,
//   alpha^2 = (A/beta)^2 * beta^2 + T1 + T2 + T3,
//   T1 = (A/beta)*beta^2 + (beta/2)^2,  T2 = 2(A + beta/2)*r,  T3 = r^2.
// Each iteration forms T1, T2 and T3 for the current operand, retires the
// low 2M bits of the running sum into the result register (shifted right
// by 2M so no left shifter is needed) and continues with A/beta. r is kept
// in its M-bit encoded form (the digit a0 itself) in register R.
//
// The registers (AB, RES, i, R, ACC, T1, T2, T3, B2, B4) and the sequence
// STEP 1 .. STEP 8 follow the design's register-transfer algorithm, each
// step label being a clock boundary:
//   STEP 1  (on start) i=0, RES=0, B2=beta/2, B4=(beta/2)^2, AB=alpha, ACC=0
//   STEP 2  R = low digit of AB, AB = AB >> M
//   STEP 3  T1 = {AB,B4}, T2 = {AB,B2}, T3 = r*r
//   STEP 4  T2 = T2 << 1, ACC = (ACC >> 2M) + T1 + T3
//   STEP 5  T2 = T2 * r
//   STEP 6  ACC = ACC + T2
//   STEP 7  RES = {ACC[2M-1:0], RES >> 2M}, i = i + 1
//   STEP 8  i == n ? done : STEP 2
// Choices of this design: STEP 4 also adds the not yet retired upper part
// of the previous ACC (ACC >> 2M), without which the square is wrong
// whenever an iteration's sum exceeds 2M bits; T1 is {AB,B4} because B4 already
// holds the zero low digit; AB is N bits wide; i has one bit more than
// log2(n) so that it can reach n; ACC/T registers are signed and
// N+2M+2 bits wide; M is a parameter, not a run-time input.
//
// Timing: start is taken while ready (STEP 1 executes on that clock edge);
// each iteration then takes 7 clocks (STEP 2 .. STEP 8), so done is high
// 7n + 1 cycles after the start cycle, with square = alpha^2 held until the
// next start.
module sqr_radix_general
  import sq_pkg::*;
#(
  parameter int unsigned N = 64,      // squarand width n*M in bits
  parameter int unsigned M = 2        // bits per digit, radix 2^M
) (
  input  logic           clk,
  input  logic           rst_n,
  input  logic           start,
  input  logic [N-1:0]   alpha,
  output logic           ready,
  output logic           done,
  output logic [2*N-1:0] square
);

  localparam int unsigned NDIG = N / M;
  localparam int unsigned IW   = $clog2(NDIG + 1);
  localparam int unsigned W    = N + 2*M + 2;

  gen_state_e            state_q;
  logic [IW-1:0]         i_q;
  logic [N-1:0]          ab_q;
  logic [M-1:0]          r_q;
  logic [M-1:0]          b2_q;
  logic [2*M-1:0]        b4_q;
  logic signed [W-1:0]   t1_q, t2_q, t3_q, acc_q;
  logic signed [M:0]     r_signed;      // r = a0 - beta/2
  logic signed [W-1:0]   r_wide;        // r sign-extended to W bits

  initial begin
    assert (M >= 1 && N % M == 0 && N >= M)
      else $error("sqr_radix_general: N must be a multiple of M");
  end

  assign r_signed = $signed({1'b0, r_q}) - $signed({1'b0, b2_q});
  assign r_wide   = W'(r_signed);
  assign ready    = (state_q == G_STEP1);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state_q <= G_STEP1;
      i_q     <= '0;
      ab_q    <= '0;
      r_q     <= '0;
      b2_q    <= '0;
      b4_q    <= '0;
      t1_q    <= '0;
      t2_q    <= '0;
      t3_q    <= '0;
      acc_q   <= '0;
      square  <= '0;
      done    <= 1'b0;
    end else begin
      done <= 1'b0;
      unique case (state_q)
        G_STEP1: if (start) begin
          i_q     <= '0;
          square  <= '0;
          b2_q    <= M'(1) << (M - 1);
          b4_q    <= (2*M)'(1) << (2*M - 2);
          ab_q    <= alpha;
          acc_q   <= '0;
          state_q <= G_STEP2;
        end
        G_STEP2: begin
          r_q     <= ab_q[M-1:0];
          ab_q    <= ab_q >> M;
          state_q <= G_STEP3;
        end
        G_STEP3: begin
          t1_q    <= $signed(W'({ab_q, b4_q}));
          t2_q    <= $signed(W'({ab_q, b2_q}));
          t3_q    <= r_wide * r_wide;
          state_q <= G_STEP4;
        end
        G_STEP4: begin
          t2_q    <= t2_q <<< 1;
          acc_q   <= (acc_q >>> (2*M)) + t1_q + t3_q;
          state_q <= G_STEP5;
        end
        G_STEP5: begin
          t2_q    <= t2_q * r_wide;
          state_q <= G_STEP6;
        end
        G_STEP6: begin
          acc_q   <= acc_q + t2_q;
          state_q <= G_STEP7;
        end
        G_STEP7: begin
          square  <= {acc_q[2*M-1:0], square[2*N-1:2*M]};
          i_q     <= i_q + IW'(1);
          state_q <= G_STEP8;
        end
        G_STEP8: begin
          if (i_q == IW'(NDIG)) begin
            done    <= 1'b1;
            state_q <= G_STEP1;
          end else begin
            state_q <= G_STEP2;
          end
        end
        default: state_q <= G_STEP1;
      endcase
    end
  end

  // the iteration index never passes n, and done only follows STEP 8
  a_index_range: assert property (@(posedge clk) disable iff (!rst_n) i_q <= IW'(NDIG));
  a_done_idle:   assert property (@(posedge clk) disable iff (!rst_n) done |-> ready);

endmodule
