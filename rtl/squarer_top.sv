// Top level: the digit-serial squarers side by side.
//
// sq4 is the radix-4 (m = 2) squarer with one iteration per clock, the
// configuration built and measured for the design: n = N/2 cycles per
// square. gen is the general radix-2^GEN_M squarer that executes the
// step-by-step register-transfer algorithm (7 clocks per iteration) for
// any digit size; it is brought out with its own ports. The two share only
// clock and reset.
//
// Each unit: give the squarand with start while ready is high; done pulses
// when square holds its 2N-bit square.
module squarer_top
  import sq_pkg::*;
#(
  parameter int unsigned N     = 64,  // squarand width of both units
  parameter int unsigned GEN_M = 2    // digit size of the general unit
) (
  input  logic           clk,
  input  logic           rst_n,
  // quaternary squarer
  input  logic           sq4_start,
  input  logic [N-1:0]   sq4_alpha,
  output logic           sq4_ready,
  output logic           sq4_done,
  output logic [2*N-1:0] sq4_square,
  output a0_case_e       sq4_a0,
  output logic           sq4_busy,
  // general-radix squarer
  input  logic           gen_start,
  input  logic [N-1:0]   gen_alpha,
  output logic           gen_ready,
  output logic           gen_done,
  output logic [2*N-1:0] gen_square
);

  sq4_squarer #(.N(N)) u_sq4 (
    .clk, .rst_n,
    .start(sq4_start), .alpha(sq4_alpha), .ready(sq4_ready),
    .done(sq4_done), .square(sq4_square), .a0(sq4_a0), .busy(sq4_busy)
  );

  sqr_radix_general #(.N(N), .M(GEN_M)) u_gen (
    .clk, .rst_n,
    .start(gen_start), .alpha(gen_alpha), .ready(gen_ready),
    .done(gen_done), .square(gen_square)
  );

endmodule
