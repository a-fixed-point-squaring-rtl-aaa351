// Self-checking test of the quaternary squarer (controller + datapath).
// N = 8: all 256 squarands, started back to back whenever ready, so one
// square completes every n = 4 cycles. N = 64: random and extreme
// squarands with random idle gaps. Each square is compared with the
// simulator's 128-bit product, and the start-to-done latency must be
// n cycles (throughput one square per n clocks).
module tb_sq4_squarer;
  import sq_pkg::*;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0;

  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s @%0t", what, $time); end
  endtask

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  logic s8, rd8, dn8, b8;   logic [7:0]  a8;  logic [15:0]  q8;  a0_case_e d8;
  logic s64, rd64, dn64, b64; logic [63:0] a64; logic [127:0] q64; a0_case_e d64;

  sq4_squarer #(.N(8))  u8  (.clk, .rst_n, .start(s8),  .alpha(a8),  .ready(rd8),  .done(dn8),  .square(q8),  .a0(d8),  .busy(b8));
  sq4_squarer #(.N(64)) u64 (.clk, .rst_n, .start(s64), .alpha(a64), .ready(rd64), .done(dn64), .square(q64), .a0(d64), .busy(b64));

  // scoreboards: squarand and start time of the operation in flight
  logic [7:0]  pend8;  longint t8;  int done8 = 0;
  logic [63:0] pend64; longint t64; int done64 = 0;
  longint cyc = 0;

  always @(posedge clk) begin
    cyc <= cyc + 1;
    if (rst_n) begin
      if (dn8) begin
        check(q8 == 16'(pend8) * 16'(pend8), $sformatf("N=8 %0d^2 = %0d", pend8, q8));
        check(cyc - t8 == 4, $sformatf("N=8 latency %0d", cyc - t8));
        done8++;
      end
      if (dn64) begin
        check(q64 == 128'(pend64) * 128'(pend64), $sformatf("N=64 %h^2", pend64));
        check(cyc - t64 == 32, $sformatf("N=64 latency %0d", cyc - t64));
        done64++;
      end
      if (s8 && rd8)   begin pend8  <= a8;  t8  <= cyc; end
      if (s64 && rd64) begin pend64 <= a64; t64 <= cyc; end
    end
  end

  // N = 8 driver: every squarand, back to back
  initial begin
    s8 = 0; a8 = 0;
    repeat (2) @(posedge clk);
    @(negedge clk) rst_n = 1;
    for (int v = 0; v < 256; v++) begin
      while (!rd8) @(negedge clk);
      a8 = 8'(v); s8 = 1;
      @(negedge clk);
      s8 = 0; a8 = 8'($urandom);
    end
  end

  // N = 64 driver
  initial begin
    s64 = 0; a64 = 0;
    @(posedge rst_n);
    for (int k = 0; k < 200; k++) begin
      logic [63:0] a;
      a = {$urandom, $urandom};
      if (k == 0) a = '1;
      if (k == 1) a = '0;
      if (k == 2) a = 64'hFFFF_FFFF_FFFF_FFFD;
      @(negedge clk);
      while (!rd64) @(negedge clk);
      a64 = a; s64 = 1;
      @(negedge clk);
      s64 = 0; a64 = {$urandom, $urandom};
      repeat ($urandom % 3) @(negedge clk);
    end
    repeat (40) @(negedge clk);
    check(done8 == 256, $sformatf("N=8 completed %0d", done8));
    check(done64 == 200, $sformatf("N=64 completed %0d", done64));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
