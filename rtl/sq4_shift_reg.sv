// 2m-bit right shift register holding the square (m = 2 here).
//
// Every iteration shifts the 2nm-bit result register right by 2m = 4 bits
// and inserts the two new radix-4 digits at the most significant end, so
// after n iterations the digits produced least significant first sit in
// place and no left shifter is needed. This follows the design's STEP 7
// (RES <- SHR(RES, 2m, LSD(ACC,2))).
//
// Interface: shift = 1 shifts at the clock edge; res is the register.
module sq4_shift_reg #(
  parameter int unsigned N = 64       // squarand width nm; res is 2nm bits
) (
  input  logic           clk,
  input  logic           rst_n,
  input  logic           shift,
  input  logic [3:0]     digits,
  output logic [2*N-1:0] res
);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)     res <= '0;
    else if (shift) res <= {digits, res[2*N-1:4]};
  end

endmodule
