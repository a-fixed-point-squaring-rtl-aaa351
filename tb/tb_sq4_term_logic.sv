// Self-checking test of the radix-4 term logic.
// For every 8-bit operand (exhaustive) and for random 64-bit operands it
// checks that left + right equals a0*(2A + a0) = alpha^2 - A^2, computed
// arithmetically, that the right bus is zero unless a0 = 3, that for a0 = 3
// the left bus is T1 = (A/4)*16 + 4, and that next_operand = alpha >> 2.
module tb_sq4_term_logic;
  import sq_pkg::*;

  int checks = 0, failures = 0;

  logic [7:0]  op8;   logic [9:0]  l8, r8;   logic [7:0]  nx8;  a0_case_e d8;
  logic [63:0] op64;  logic [65:0] l64, r64; logic [63:0] nx64; a0_case_e d64;

  sq4_term_logic #(.N(8))  u8  (.operand(op8),  .left(l8),  .right(r8),  .next_operand(nx8),  .a0(d8));
  sq4_term_logic #(.N(64)) u64 (.operand(op64), .left(l64), .right(r64), .next_operand(nx64), .a0(d64));

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [127:0] a, a0v, s;
    for (int v = 0; v < 256; v++) begin
      op8 = 8'(v);
      #1;
      a0v = 128'(v % 4);
      a   = 128'(v) - a0v;
      s   = a0v * (2 * a + a0v);
      check(128'(l8) + 128'(r8) == s, $sformatf("sum N=8 op=%0d", v));
      check(nx8 == 8'(v >> 2), $sformatf("next N=8 op=%0d", v));
      check(int'(d8) == v % 4, "a0 N=8");
      if (v % 4 == 3) check(128'(l8) == (a / 4) * 16 + 4, "T1 N=8");
      else            check(r8 == '0, "right zero N=8");
    end
    for (int k = 0; k < 2000; k++) begin
      op64 = {$urandom, $urandom};
      if (k < 4) op64 = {62'h3FFF_FFFF_FFFF_FFFF, 2'(k)};
      #1;
      a0v = 128'(op64[1:0]);
      a   = 128'(op64) - a0v;
      s   = a0v * (2 * a + a0v);
      check(128'(l64) + 128'(r64) == s, $sformatf("sum N=64 op=%h", op64));
      check(nx64 == op64 >> 2, "next N=64");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
