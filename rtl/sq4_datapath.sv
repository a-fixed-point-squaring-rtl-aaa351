// Datapath of the quaternary (radix-4, m = 2) digit-serial squarer.
//
// One iteration per clock: the operand multiplexer presents either the new
// squarand (load) or the fed-back operand A/beta; the term logic forms the
// two 2n+2-bit buses for T1+T2+T3 from the operand's low digit a0; the adder
// array sums them; the accumulator adds the carried upper part of the
// previous total and retires two result digits (4 bits) into the 2nm-bit
// right shift register. After n = N/2 iterations res holds alpha^2.
// The block order and the bus widths (2n, 2n+2, 2n+3, 4, 2n-1, 2nm) are
// those of the design's datapath figure.
//
// Interface: load and en come from the controller (see sq4_controller);
// a0 is exported for observation only.
module sq4_datapath
  import sq_pkg::*;
#(
  parameter int unsigned N = 64       // squarand width nm = 2n bits (even)
) (
  input  logic           clk,
  input  logic           rst_n,
  input  logic           load,
  input  logic           en,
  input  logic [N-1:0]   alpha,
  output logic [2*N-1:0] res,
  output a0_case_e       a0
);

  logic [N-1:0] operand, next_operand;
  logic [N+1:0] left, right;
  logic [N+2:0] sum;
  logic [3:0]   digits;

  sq4_operand_mux #(.N(N)) u_mux (
    .clk, .rst_n, .load, .en, .alpha, .fb(next_operand), .operand
  );

  sq4_term_logic #(.N(N)) u_terms (
    .operand, .left, .right, .next_operand, .a0
  );

  sq4_adder_array #(.N(N)) u_adder (
    .left, .right, .sum
  );

  sq4_accumulator #(.N(N)) u_acc (
    .clk, .rst_n, .clear(load), .en, .addend(sum), .digits
  );

  sq4_shift_reg #(.N(N)) u_res (
    .clk, .rst_n, .shift(en), .digits, .res
  );

endmodule
