// Adder array of the quaternary squarer.
//
// Adds the two 2n+2-bit buses from the term logic into the 2n+3-bit
// iteration sum T1+T2+T3. The design only needs a real addition when the
// operand digit a0 is 3; in every other case the right bus is zero. Written
// as a single behavioural adder, which synthesis maps to whatever adder the
// target prefers (the adder structure is not specified). Combinational.
module sq4_adder_array #(
  parameter int unsigned N = 64       // squarand width nm = 2n bits
) (
  input  logic [N+1:0] left,
  input  logic [N+1:0] right,
  output logic [N+2:0] sum
);

  assign sum = {1'b0, left} + {1'b0, right};

endmodule
