// Controller of the quaternary squarer.
//
// A squaring of an N-bit squarand takes n = N/2 iterations, one per clock
// cycle. The controller keeps the iteration index i (ceil(log2 n) bits) and
// a two-state machine. In IDLE, start launches iteration 0 in the same
// cycle: load selects the squarand at the operand multiplexer and clears the
// accumulator carry. In BUSY it runs iterations 1 .. n-1 and returns to IDLE
// after the last, raising done for one cycle while the finished square is in
// the result register. A new start may be given in that same cycle, so
// squarings follow each other every n cycles.
//
// The iteration count and the check i = n come from the algorithm; one
// iteration per clock and the start/ready/done handshake are this design's
// choices. start is ignored while busy (ready = 0).
module sq4_controller
  import sq_pkg::*;
#(
  parameter int unsigned N = 64       // squarand width nm = 2n bits
) (
  input  logic clk,
  input  logic rst_n,
  input  logic start,
  output logic ready,                 // idle, start is accepted
  output logic load,                  // iteration 0: select squarand
  output logic en,                    // an iteration runs this cycle
  output logic done                   // one-cycle pulse, square valid
);

  localparam int unsigned NDIG = N / 2;
  localparam int unsigned IW   = (NDIG > 1) ? $clog2(NDIG) : 1;
  localparam logic [IW-1:0] LAST = IW'(NDIG - 1);

  ctrl_state_e   state_q;
  logic [IW-1:0] i_q;
  logic          last;

  assign ready = (state_q == C_IDLE);
  assign load  = ready && start;
  assign en    = load || (state_q == C_BUSY);
  assign last  = en && (i_q == LAST || (load && NDIG == 1));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state_q <= C_IDLE;
      i_q     <= '0;
      done    <= 1'b0;
    end else begin
      done <= last;
      if (load) begin
        // iteration 0 runs now; the next cycle is iteration 1
        i_q     <= IW'(1);
        state_q <= (NDIG == 1) ? C_IDLE : C_BUSY;
      end else if (state_q == C_BUSY) begin
        if (i_q == LAST) begin
          i_q     <= '0;
          state_q <= C_IDLE;
        end else begin
          i_q <= i_q + IW'(1);
        end
      end
    end
  end

  // done is raised only when the last iteration has run, and the
  // controller is then idle again
  a_done_idle: assert property (@(posedge clk) disable iff (!rst_n) done |-> ready);
  // while busy the index is never 0 (iteration 0 always runs with load)
  a_busy_index: assert property (@(posedge clk) disable iff (!rst_n)
                                 (state_q == C_BUSY) |-> (i_q != '0));

endmodule
