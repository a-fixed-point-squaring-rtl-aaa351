// Self-checking test of the accumulator: runs sequences of random addends
// (the first of each sequence with clear), keeps the un-retired total in a
// 128-bit reference and checks the 4 retired bits every cycle.
module tb_sq4_accumulator;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0, clear, en;
  logic [66:0] addend;
  logic [3:0]  digits;
  logic [127:0] model_carry, total;
  int carries = 0;

  sq4_accumulator #(.N(64)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    clear = 0; en = 0; addend = '0; model_carry = '0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int k = 0; k < 3000; k++) begin
      @(negedge clk);
      clear = (k % 32) == 0;
      en    = ($urandom % 5) != 0 || clear;
      // keep addends within the 6*4^n bound of an iteration sum
      addend = {3'b0, $urandom, $urandom} * 67'(1 + $urandom % 6);
      if (clear) model_carry = '0;
      total = 128'(addend) + model_carry;
      #1;
      checks++;
      if (digits !== total[3:0]) begin
        failures++;
        $display("FAIL k=%0d digits=%h exp=%h", k, digits, total[3:0]);
      end
      @(posedge clk);
      if (en) begin
        model_carry = total >> 4;
        if (model_carry != 0) carries++;
      end
    end
    checks++;
    if (carries == 0) begin failures++; $display("FAIL no carry exercised"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
