// Self-checking test of the adder array: random and extreme 66-bit buses,
// sum compared with the sum computed on 128-bit values.
module tb_sq4_adder_array;
  int checks = 0, failures = 0;
  logic [65:0] l, r;
  logic [66:0] s;

  sq4_adder_array #(.N(64)) dut (.left(l), .right(r), .sum(s));

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [127:0] exp;
    for (int k = 0; k < 3000; k++) begin
      l = {$urandom, $urandom, $urandom};
      r = {$urandom, $urandom, $urandom};
      if (k == 0) begin l = '1; r = '1; end
      if (k == 1) begin l = '1; r = 66'd1; end
      #1;
      exp = 128'(l) + 128'(r);
      checks++;
      if (128'(s) != exp) begin
        failures++;
        $display("FAIL %h + %h = %h", l, r, s);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
