// Operand multiplexer of the quaternary squarer.
//
// On the first iteration of a squaring (load = 1) the squarand alpha goes
// straight to the term logic, so iteration 0 needs no extra load cycle. On
// later iterations the term logic sees the operand it produced itself in the
// previous cycle, A/beta = operand >> 2, held in the feedback register here.
// The multiplexer and the feedback path are as drawn in the datapath figure
// of the design; placing the one operand register on the feedback path
// (rather than after the multiplexer) is this design's choice, made so that
// one squaring takes exactly n = N/2 clock cycles.
//
// Interface: alpha (N bits), fb (N bits, from the term logic), load selects
// alpha, en captures fb at the clock edge. operand is combinational.
module sq4_operand_mux #(
  parameter int unsigned N = 64       // squarand width nm in bits (even)
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         load,
  input  logic         en,
  input  logic [N-1:0] alpha,
  input  logic [N-1:0] fb,
  output logic [N-1:0] operand
);

  logic [N-1:0] op_q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)  op_q <= '0;
    else if (en) op_q <= fb;
  end

  assign operand = load ? alpha : op_q;

endmodule
