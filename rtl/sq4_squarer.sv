// Quaternary digit-serial squarer: controller plus datapath.
//
// Squares an unsigned N-bit fixed-point squarand, treating it as n = N/2
// radix-4 digits and retiring two result digits per clock, least
// significant first. Give alpha with start while ready is high; done pulses
// n cycles later with square = alpha^2 (2N bits), which then holds until
// the next start. start may be given again in the done cycle, giving one
// square every n cycles (throughput 1/(n * Tclk)).
//
// The split into a controller and a datapath module under a third top-level
// module follows the design; the handshake is this design's own.
module sq4_squarer
  import sq_pkg::*;
#(
  parameter int unsigned N = 64       // squarand width nm (even, >= 4)
) (
  input  logic           clk,
  input  logic           rst_n,
  input  logic           start,
  input  logic [N-1:0]   alpha,
  output logic           ready,
  output logic           done,
  output logic [2*N-1:0] square,
  output a0_case_e       a0,          // current low digit, observation
  output logic           busy         // an iteration runs this cycle
);

  logic load, en;

  initial begin
    assert (N >= 4 && N % 2 == 0)
      else $error("sq4_squarer: N must be even and at least 4");
  end

  sq4_controller #(.N(N)) u_ctrl (
    .clk, .rst_n, .start, .ready, .load, .en, .done
  );

  sq4_datapath #(.N(N)) u_dp (
    .clk, .rst_n, .load, .en, .alpha, .res(square), .a0
  );

  assign busy = en;

endmodule
