// T1/T2/T3 combinational logic of the quaternary (radix-4) squarer.
//
// With the current operand alpha = A + a0 (a0 its least significant radix-4
// digit) one iteration must add S = T1 + T2 + T3 = a0*(2A + a0) to the
// accumulated result, where T1 = (A/4)*16 + 4, T2 = 2(A+2)r, T3 = r*r and
// r = a0 - 2. For radix 4 every case reduces to bit strings built from
// H = A/4 = operand >> 2 (bits b[2n-1:2]):
//   a0 = 0: left = 0                       right = 0
//   a0 = 1: left = {0, H, 001}  (= 8H+1)   right = 0
//   a0 = 2: left = {H, 0100}    (= 16H+4)  right = 0
//   a0 = 3: left = {H, 0100}    (= T1)     right = {0, H, 101} (= T2+T3)
// Two 4:1 multiplexers selected by a0 drive the two 2n+2-bit adder buses;
// these cases and the multiplexer structure follow the design's derivation.
// The block also returns the next operand H (zero-extended to N bits) for
// the feedback path. Purely combinational.
module sq4_term_logic
  import sq_pkg::*;
#(
  parameter int unsigned N = 64       // squarand width nm = 2n bits (even)
) (
  input  logic [N-1:0] operand,
  output logic [N+1:0] left,          // leftmost adder input, 2n+2 bits
  output logic [N+1:0] right,         // rightmost adder input, 2n+2 bits
  output logic [N-1:0] next_operand,  // A/beta for the next iteration
  output a0_case_e     a0             // least significant digit
);

  logic [N-3:0] h;                    // A/beta, n-1 radix-4 digits

  assign h            = operand[N-1:2];
  assign a0           = a0_case_e'(operand[1:0]);
  assign next_operand = {2'b00, h};

  always_comb begin
    unique case (a0)
      A0_ZERO:  left = '0;
      A0_ONE:   left = {1'b0, h, 3'b001};
      A0_TWO:   left = {h, 4'b0100};
      A0_THREE: left = {h, 4'b0100};
      default:  left = '0;
    endcase
    right = (a0 == A0_THREE) ? {1'b0, h, 3'b101} : '0;
  end

endmodule
