// Self-checking test of the operand multiplexer and its feedback register:
// random load/en/alpha/fb, output compared with a reference register model.
module tb_sq4_operand_mux;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0, load, en;
  logic [63:0] alpha, fb, operand, model_q;

  sq4_operand_mux #(.N(64)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    load = 0; en = 0; alpha = '0; fb = '0; model_q = '0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int k = 0; k < 2000; k++) begin
      @(negedge clk);
      load  = ($urandom % 4) == 0;
      en    = ($urandom % 3) != 0;
      alpha = {$urandom, $urandom};
      fb    = {$urandom, $urandom};
      #1;
      checks++;
      if (operand !== (load ? alpha : model_q)) begin
        failures++;
        $display("FAIL k=%0d operand=%h", k, operand);
      end
      @(posedge clk);
      if (en) model_q = fb;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
