// Self-checking test of the result shift register: random digit pairs and
// shift enables, register compared with a reference model after each edge.
module tb_sq4_shift_reg;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0, shift;
  logic [3:0] digits;
  logic [127:0] res, model;

  sq4_shift_reg #(.N(64)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    shift = 0; digits = 0; model = '0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int k = 0; k < 2000; k++) begin
      @(negedge clk);
      shift  = ($urandom % 4) != 0;
      digits = 4'($urandom);
      @(posedge clk);
      if (shift) model = {digits, model[127:4]};
      #1;
      checks++;
      if (res !== model) begin
        failures++;
        $display("FAIL k=%0d res=%h exp=%h", k, res, model);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
